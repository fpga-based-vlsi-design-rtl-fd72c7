// tb_prng: checks the 16-bit LFSR against a reference model kept in the
// testbench (the same recurrence written from the polynomial
// x^16 + x^14 + x^13 + x^11 + 1), checks that a zero seed is replaced by
// the default, that step low holds the state, and that the sequence from
// any seed returns to it after exactly 65535 steps and not before.
module tb_prng;
  logic        clk = 0, rst = 1, load = 0, step = 0;
  logic [15:0] seed = '0, value;
  int checks = 0, failures = 0;

  prng dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] next(input logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: expected %h got %h", what, exp, got);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] model;
    int period;
    repeat (2) @(negedge clk);
    rst = 0;
    check("reset seed", value, 16'hACE1);
    // load a seed and follow 1000 steps against the model
    load = 1; seed = 16'h1234;
    @(negedge clk);
    load = 0;
    check("load", value, 16'h1234);
    model = 16'h1234;
    step = 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      model = next(model);
      check("step", value, model);
    end
    // step low holds the state
    step = 0;
    repeat (3) @(negedge clk);
    check("hold", value, model);
    // zero seed falls back to the default
    load = 1; seed = 16'h0000;
    @(negedge clk);
    load = 0;
    check("zero seed", value, 16'hACE1);
    // full period
    step = 1;
    period = 0;
    do begin
      @(negedge clk);
      period++;
      checks++;
      if (value == 16'h0000) begin failures++; $display("FAIL reached zero"); end
    end while (value != 16'hACE1 && period < 70000);
    checks++;
    if (period != 65535) begin failures++; $display("FAIL period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
