// tb_confirmed_primes: offers primes to the pair collector and checks
// p, q, n = p*q and phi = (p-1)*(q-1) against the testbench's own
// arithmetic, that a repeated prime is dropped with dup, that primes after
// the second are ignored, that clear restarts, and that valid rises two
// clocks after the second prime. The first case is p = 61, q = 53, which
// gives n = 3233 and phi = 3120.
module tb_confirmed_primes;
  logic        clk = 0, rst = 1, clear = 0, prime_valid = 0;
  logic [15:0] prime_in = '0;
  logic        need, dup, valid;
  logic [15:0] p, q;
  logic [31:0] n, phi;
  int checks = 0, failures = 0, dups_seen = 0;

  confirmed_primes dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (dup) dups_seen++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic offer(input logic [15:0] x);
    @(negedge clk);
    prime_valid = 1; prime_in = x;
    @(negedge clk);
    prime_valid = 0;
  endtask

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: expected %0d got %0d", what, exp, got);
    end
  endtask

  task automatic pair(input logic [15:0] a, input logic [15:0] b, input bit repeat_a);
    int wait_cycles;
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    check("need after clear", need, 1);
    offer(a);
    check("need after one", need, 1);
    if (repeat_a) begin
      int dups_before = dups_seen;
      offer(a);
      @(negedge clk);
      check("dup pulse", dups_seen - dups_before, 1);
      check("need after dup", need, 1);
    end
    offer(b);               // b was offered one clock before this point
    wait_cycles = 1;
    check("need after two", need, 0);
    while (!valid) begin @(negedge clk); wait_cycles++; end
    check("valid latency", wait_cycles, 2);
    offer(16'd7);          // ignored
    check("p", p, a);
    check("q", q, b);
    check("n", n, longint'(a) * longint'(b));
    check("phi", phi, (longint'(a) - 1) * (longint'(b) - 1));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    pair(16'd61, 16'd53, 1'b0);
    check("paper n", n, 3233);
    check("paper phi", phi, 3120);
    pair(16'd65521, 16'd65519, 1'b1);
    pair(16'd32771, 16'd65521, 1'b1);
    for (int k = 0; k < 50; k++) begin
      logic [15:0] a, b;
      a = 16'($urandom) | 16'h8001;
      b = 16'($urandom) | 16'h8001;
      if (a == b) b = b ^ 16'h0002;
      pair(a, b, k[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
