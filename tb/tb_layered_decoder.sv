// tb_layered_decoder: drives codewords with noise into the layered decoder
// and compares hard decisions, soft outputs, iteration count, success flag,
// Channel RAM access counts and the start-to-done cycle count with the
// reference model. Includes the all-zero word with one weak error (must be
// corrected), random noisy codewords, and hopeless inputs that run to the
// iteration limit.
module tb_layered_decoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int MAXIT = 6;

  logic clk = 0, rst_n = 0;
  logic start = 0, in_valid = 0;
  llr_t in_llr = '0;
  logic in_ready, busy, done, success, layer_done;
  row_t hard_out;
  logic [$clog2(MAXIT+1)-1:0] iterations;
  col_t soft_addr = '0;
  llr_t soft_data;
  logic [LW-1:0] layer_idx;
  logic [15:0] ram_reads, ram_writes, bypasses;

  int checks = 0, failures = 0;
  int n_ok = 0, n_fail = 0, n_byp = 0, n_early = 0;

  layered_decoder #(.MAX_ITER(MAXIT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(int lam [RN]);
    ref_result_t r;
    int cyc, layers_seen;
    r = ref_decode(lam, MAXIT);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    for (int n = 0; n < RN; n++) begin
      in_valid = 1;
      in_llr   = llr_t'(lam[n]);
      check(in_ready, "in_ready during load");
      @(negedge clk);
      cyc++;
    end
    in_valid = 0;
    layers_seen = 0;
    while (!done) begin
      if (layer_done) begin
        check(hard_out == r.layer_hd[layers_seen], "hard decisions after layer");
        check(int'(layer_idx) == r.layer_id[layers_seen], "layer index");
        layers_seen++;
      end
      @(negedge clk);
      cyc++;
      if (cyc > 5000) break;
    end
    check(layers_seen == r.layers, "number of layers processed");
    check(hard_out == r.hd, $sformatf("final hard decisions %b vs %b", hard_out, r.hd));
    check(success == r.ok, "success flag");
    check(int'(iterations) == r.iters, $sformatf("iterations %0d vs %0d", iterations, r.iters));
    check(int'(ram_reads) == r.reads, $sformatf("RAM reads %0d vs %0d", ram_reads, r.reads));
    check(int'(ram_writes) == r.writes, $sformatf("RAM writes %0d vs %0d", ram_writes, r.writes));
    check(int'(bypasses) == r.byps, $sformatf("bypasses %0d vs %0d", bypasses, r.byps));
    // Of the 12 column accesses per iteration, 6 pass through the bypass:
    // 2 + 2 in the first iteration (layer 0 has no predecessor), 6 after.
    check(int'(bypasses) == 6 * r.iters - 2, "six of twelve accesses bypassed per iteration");
    check(int'(ram_reads) == 12 * r.iters - int'(bypasses), "reads not bypassed go to the RAM");
    // load N, 18 cycles per iteration (12 reads, one stall, the last
    // layer's 4 writes, the check), flush N
    check(cyc == RN + r.iters * 18 + RN + 1,
          $sformatf("latency %0d vs %0d", cyc, RN + r.iters * 18 + RN + 1));
    @(negedge clk);
    check(!busy, "idle after done");
    for (int n = 0; n < RN; n++) begin
      soft_addr = col_t'(n);
      #1;
      check(int'(soft_data) == r.lam[n], $sformatf("soft output col %0d: %0d vs %0d", n, soft_data, r.lam[n]));
    end
    if (r.ok) n_ok++; else n_fail++;
    if (r.ok && r.iters < MAXIT) n_early++;
    if (r.byps > 0) n_byp++;
  endtask

  initial begin
    int lam [RN];
    bit [RN-1:0] c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // All-zero word, column 2 weakly wrong: must be corrected.
    lam = '{12, 10, -3, 14, 9, 11, 13};
    run(lam);
    check(hard_out == '0 && success, "single weak error corrected");
    // Codeword 1011 with strong values: converges in one iteration.
    c = encode(4'b1011);
    for (int n = 0; n < RN; n++) lam[n] = c[n] ? -20 : 20;
    run(lam);
    check(hard_out == c && iterations == 1, "clean codeword decoded in one iteration");
    // Random codewords with noise.
    for (int t = 0; t < 60; t++) begin
      c = encode(4'($urandom));
      for (int n = 0; n < RN; n++)
        lam[n] = (c[n] ? -8 : 8) + int'($urandom_range(0, 20)) - 10;
      run(lam);
    end
    // Inputs that satisfy no codeword well: run to the iteration limit.
    lam = '{-1, 1, -1, 1, -1, 1, -1};
    run(lam);
    lam = '{-128, 127, 0, 0, 0, -128, 127};
    run(lam);
    check(n_ok > 0 && n_fail > 0 && n_byp > 0 && n_early > 0, "all outcomes seen");
    $display("decoded=%0d failed=%0d", n_ok, n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
