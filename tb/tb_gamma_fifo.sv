// tb_gamma_fifo: random push/pop traffic (never pushing when full without
// a pop, never popping when empty) against a queue model; checks data
// order, empty and full.
module tb_gamma_fifo;
  localparam int DEPTH = 4, WIDTH = 8;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [WIDTH-1:0] din = '0, dout;
  logic empty, full;
  logic [WIDTH-1:0] q [$];
  int checks = 0, failures = 0, n_full = 0;

  gamma_fifo dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      if (q.size() > 0) check(dout == q[0], "head word");
      if (full) n_full++;
      pop  = (q.size() > 0) && ($urandom_range(0, 2) == 0 || (t / 500) % 2 == 1 && $urandom_range(0, 1) == 1);
      push = ($urandom_range(0, 1) == 1) && (q.size() < DEPTH || pop);
      din  = WIDTH'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    check(n_full > 0, "full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
