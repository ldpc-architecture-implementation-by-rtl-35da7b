// tb_ldpc_top: end-to-end test of the whole design at its default
// parameters (10 iterations at most, 4-word state memory). Each test
// loads seven LLRs, lets the decoder run to done and checks, against the
// reference model: the hard decisions after every layer and at the end,
// soft outputs, iteration count, success flag, Channel RAM reads, writes
// and bypasses, the start-to-done cycle count, and every record of the
// node-state recorder (present, next and current state, new-word flag,
// memory use, overflow, visit and saved counters).
// It counts how often each mechanism occurred: memory bypass, forwarding
// of the add-array result in the same cycle, read stall, flush of
// bypassed values, early stop on a satisfied syndrome, stop at the
// iteration limit, shared state-memory word, new state-memory word and
// state-memory overflow; one that never occurred is a failure.
module tb_ldpc_top;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int MAXIT = 10, RDEPTH = 4;

  logic clk = 0, rst_n = 0;
  logic start = 0, in_valid = 0;
  llr_t in_llr = '0;
  logic in_ready, busy, done, success;
  row_t hard_out;
  logic [3:0] iterations;
  col_t soft_addr = '0;
  llr_t soft_data;
  logic [15:0] ram_reads, ram_writes, bypasses;
  logic rec_valid, rec_new, rec_overflow;
  logic [2:0] rec_pres_state, rec_next_state, rec_curr_state, rec_used, rec_rd_addr = '0;
  logic [15:0] rec_visits, rec_saved;
  logic [7:0] rec_rd_data;

  int checks = 0, failures = 0;
  int n_bypass = 0, n_flush = 0, n_early = 0, n_limit = 0;
  int n_shared = 0, n_newword = 0, n_overflow = 0;
  int n_forward = 0, n_stall = 0;

  // Forwarding from the add-array to the next layer, and read stalls.
  always @(posedge clk) begin
    if (dut.u_dec.r_go && dut.u_dec.r_fwd) n_forward++;
    if (dut.u_dec.state == dut.u_dec.S_RUN && dut.u_dec.r_busy && dut.u_dec.r_stall) n_stall++;
  end

  ldpc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
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
    int cyc, nrec, nsteps, saved_exp, exp_addr, prev_state;
    int st [MAX_LAYERS + 1];
    bit [7:0] dt [MAX_LAYERS + 1];
    bit [7:0] mem [$];
    bit ovf, seen_done;
    r = ref_decode(lam, MAXIT);
    // expected state walk: one state per layer, then back to s0
    nsteps = r.layers + 1;
    for (int i = 0; i < r.layers; i++) begin
      st[i] = r.layer_id[i] + 1;
      dt[i] = {1'b0, r.layer_hd[i]};
    end
    st[r.layers] = 0;
    dt[r.layers] = {1'b0, r.hd};
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    nrec = 0; saved_exp = 0; prev_state = 0; ovf = 0; seen_done = 0;
    for (int n = 0; n < RN; n++) begin
      in_valid = 1;
      in_llr   = llr_t'(lam[n]);
      @(negedge clk);
      cyc++;
    end
    in_valid = 0;
    while (nrec < nsteps && cyc < 5000) begin
      if (done && !seen_done) begin
        seen_done = 1;
        check(cyc == RN + r.iters * 18 + RN + 1, $sformatf("latency %0d", cyc));
      end
      if (rec_valid) begin
        exp_addr = 0;
        foreach (mem[i]) if (mem[i] == dt[nrec] && exp_addr == 0) exp_addr = i + 1;
        if (exp_addr != 0) begin
          saved_exp++;
          n_shared++;
          check(!rec_new, "shared word not flagged new");
        end else if (mem.size() < RDEPTH) begin
          mem.push_back(dt[nrec]);
          exp_addr = mem.size();
          n_newword++;
          check(rec_new, "new word flagged");
        end else begin
          ovf = 1;
          n_overflow++;
        end
        check(int'(rec_pres_state) == prev_state, $sformatf("pres state %0d vs %0d", rec_pres_state, prev_state));
        check(int'(rec_next_state) == st[nrec], $sformatf("next state %0d vs %0d", rec_next_state, st[nrec]));
        check(int'(rec_curr_state) == exp_addr, $sformatf("curr state %0d vs %0d", rec_curr_state, exp_addr));
        check(rec_overflow == ovf, "state memory overflow flag");
        check(int'(rec_used) == mem.size(), "state memory use");
        prev_state = st[nrec];
        nrec++;
      end
      @(negedge clk);
      cyc++;
    end
    check(nrec == nsteps, $sformatf("state records %0d vs %0d", nrec, nsteps));
    check(int'(rec_visits) == nsteps && int'(rec_saved) == saved_exp, "recorder counters");
    check(hard_out == r.hd, $sformatf("final hard decisions %b vs %b", hard_out, r.hd));
    check(success == r.ok, "success flag");
    check(int'(iterations) == r.iters, $sformatf("iterations %0d vs %0d", iterations, r.iters));
    check(int'(ram_reads) == r.reads, $sformatf("RAM reads %0d vs %0d", ram_reads, r.reads));
    check(int'(ram_writes) == r.writes, $sformatf("RAM writes %0d vs %0d", ram_writes, r.writes));
    check(int'(bypasses) == r.byps, $sformatf("bypasses %0d vs %0d", bypasses, r.byps));
    check(!busy, "idle after done");
    for (int n = 0; n < RN; n++) begin
      soft_addr = col_t'(n);
      #1;
      check(int'(soft_data) == r.lam[n], $sformatf("soft output col %0d", n));
    end
    foreach (mem[i]) begin
      rec_rd_addr = 3'(i + 1);
      #1;
      check(rec_rd_data == mem[i], "stored state output");
    end
    if (bypasses > 0) n_bypass++;
    if (ram_writes > 16'(r.writes - 2)) n_flush++;
    if (r.ok && r.iters < MAXIT) n_early++;
    if (!r.ok && r.iters == MAXIT) n_limit++;
  endtask

  initial begin
    int lam [RN];
    bit [RN-1:0] c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // All-zero word with one weak error in column 2.
    lam = '{12, 10, -3, 14, 9, 11, 13};
    run(lam);
    check(hard_out == '0 && success, "weak error corrected");
    // Random noisy codewords.
    for (int t = 0; t < 100; t++) begin
      c = encode(4'($urandom));
      for (int n = 0; n < RN; n++)
        lam[n] = (c[n] ? -8 : 8) + int'($urandom_range(0, 24)) - 12;
      run(lam);
    end
    // Inputs far from any codeword.
    lam = '{-1, 1, -1, 1, -1, 1, -1};
    run(lam);
    lam = '{-128, 127, 0, 0, 0, -128, 127};
    run(lam);
    for (int t = 0; t < 20; t++) begin
      for (int n = 0; n < RN; n++) lam[n] = int'($urandom_range(0, 16)) - 8;
      run(lam);
    end
    // Search for inputs whose decisions pass through more distinct words
    // than the state memory holds, and run the first few found.
    begin
      int found;
      found = 0;
      for (int t = 0; t < 20000 && found < 3; t++) begin
        ref_result_t r;
        bit [RN-1:0] seen [$];
        bit hit;
        for (int n = 0; n < RN; n++) lam[n] = int'($urandom_range(0, 40)) - 20;
        r = ref_decode(lam, MAXIT);
        seen.delete();
        for (int i = 0; i <= r.layers; i++) begin
          hit = 0;
          foreach (seen[j]) if (seen[j] == ((i < r.layers) ? r.layer_hd[i] : r.hd)) hit = 1;
          if (!hit) seen.push_back((i < r.layers) ? r.layer_hd[i] : r.hd);
        end
        if (seen.size() > RDEPTH) begin
          found++;
          run(lam);
        end
      end
    end
    $display("forwarding=%0d read_stall=%0d", n_forward, n_stall);
    check(n_forward > 0, "add-array result forwarded to the next layer");
    check(n_stall > 0, "read engine stalled on a value not yet produced");
    $display("mechanisms: bypass=%0d flush=%0d early_stop=%0d iteration_limit=%0d shared_word=%0d new_word=%0d overflow=%0d",
             n_bypass, n_flush, n_early, n_limit, n_shared, n_newword, n_overflow);
    check(n_bypass > 0, "memory bypass occurred");
    check(n_flush > 0, "bypass flush occurred");
    check(n_early > 0, "early stop occurred");
    check(n_limit > 0, "iteration limit reached");
    check(n_shared > 0, "state memory word shared");
    check(n_newword > 0, "state memory word added");
    check(n_overflow > 0, "state memory overflow occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
