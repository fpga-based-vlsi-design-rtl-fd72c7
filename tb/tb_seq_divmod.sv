// tb_seq_divmod: checks the sequential divider with 64-bit dividends and
// 32-bit divisors (the RSA core's reduction) on random and corner values.
// Quotient and remainder are compared with the simulator's / and %, and
// the latency from start to done is checked to be NW + 1 = 65 cycles.
module tb_seq_divmod;
  localparam int NW = 64, DW = 32;
  logic          clk = 0, rst = 1, start = 0;
  logic [NW-1:0] dividend;
  logic [DW-1:0] divisor;
  logic          busy, done;
  logic [NW-1:0] quo;
  logic [DW-1:0] rem;
  int checks = 0, failures = 0;

  seq_divmod #(.NW(NW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint unsigned x, input longint unsigned y);
    int cycles = 0;
    @(negedge clk);
    dividend = x; divisor = DW'(y); start = 1;
    @(negedge clk);
    start = 0; cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks += 3;
    if (quo != x / y)  begin failures++; $display("FAIL quo %h / %h: %h", x, y, quo); end
    if (rem != DW'(x % y)) begin failures++; $display("FAIL rem %h %% %h: %h", x, y, rem); end
    if (cycles != NW + 1) begin failures++; $display("FAIL latency %0d", cycles); end
  endtask

  initial begin
    dividend = '0; divisor = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    run(64'd7 * 64'd1, 64'hCA1);
    run(64'hFFFF_FFFF_FFFF_FFFF, 64'h1);
    run(64'hFFFF_FFFF_FFFF_FFFF, 64'hFFFF_FFFF);
    run(64'h0, 64'h3);
    run(64'd12345, 64'd12346);
    for (int k = 0; k < 1500; k++) begin
      longint unsigned x, y;
      x = {32'($urandom), 32'($urandom)};
      y = 64'($urandom);
      if (k % 3 == 0) y = y >> ($urandom % 31);
      if (y == 0) y = 1;
      run(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
