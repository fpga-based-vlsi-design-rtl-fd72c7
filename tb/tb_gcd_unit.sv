// tb_gcd_unit: checks public / private exponent selection.
// Cases: phi = 3120 must give e = 17, d = 2753; phi = 53040 (a multiple of
// 17) must reject 17 and settle on 19; phi = 16 leaves no valid e (ok = 0);
// and random 32-bit phi values. For each, the expected e is found by the
// testbench's own gcd search, and d is checked by 0 < d < phi and
// e * d mod phi = 1 in 64-bit arithmetic.
module tb_gcd_unit;
  logic        clk = 0, rst = 1, start = 0;
  logic [31:0] phi = '0, e, d;
  logic        busy, done, ok;
  logic [7:0]  rejects;
  int checks = 0, failures = 0;

  gcd_unit dut (.*);

  always #5 clk = ~clk;

  function automatic longint unsigned gcd(input longint unsigned a, input longint unsigned b);
    while (b != 0) begin
      longint unsigned t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: expected %0d got %0d", what, exp, got);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint unsigned ph);
    longint unsigned ee = 17;
    int rej = 0;
    bit exp_ok;
    while (ee < ph && gcd(ph, ee) != 1) begin ee += 2; rej++; end
    exp_ok = (ee < ph);
    @(negedge clk);
    phi = 32'(ph); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    check("ok", ok, exp_ok);
    if (exp_ok) begin
      check("e", e, ee);
      check("rejects", rejects, rej);
      check("d range", (d > 0 && d < ph), 1);
      check("e*d mod phi", (longint'(e) * longint'(d)) % ph, 1);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(3120);
    check("paper e", e, 17);
    check("paper d", d, 2753);
    run(53040);
    check("e after reject", e, 19);
    run(16);
    run(18);
    run(64'hFFFF_FFFE);
    for (int k = 0; k < 300; k++) begin
      longint unsigned ph = 64'($urandom) & ~64'h1;
      if (k % 10 == 0) ph = ph - (ph % 17) + 34;   // force a common factor 17
      if (ph < 20) ph = 3120;
      run(ph & 64'hFFFF_FFFF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
