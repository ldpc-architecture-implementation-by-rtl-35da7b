// tb_node_state_recorder: replays the three-state example s0 -> s1 -> s2
// -> s3 with outputs 01010101, 01011101, 01010101 and expects present /
// next / current states (0,1,1), (1,2,2), (2,3,1); then random state walks
// with gaps between steps, checked against a model of the state registers
// and of the deduplicated memory, including the visit and saved counters.
module tb_node_state_recorder;
  localparam int STATE_W = 3, DATA_W = 8, DEPTH = 4, AW = 3;
  logic clk = 0, rst_n = 0, clear = 0, step_valid = 0;
  logic [STATE_W-1:0] step_state = '0, pres_state, next_state;
  logic [DATA_W-1:0] step_data = '0, rd_data;
  logic rec_valid, rec_new, overflow;
  logic [AW-1:0] curr_state, used, rd_addr = '0;
  logic [15:0] visits, saved;
  int checks = 0, failures = 0;
  logic [DATA_W-1:0] mem [$];
  int m_prev, m_next, m_visits, m_saved;

  node_state_recorder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(int s, logic [DATA_W-1:0] d, int gap);
    int a;
    a = 0;
    foreach (mem[i]) if (mem[i] == d && a == 0) a = i + 1;
    if (a != 0) m_saved++;
    else if (mem.size() < DEPTH) begin mem.push_back(d); a = mem.size(); end
    m_prev = m_next; m_next = s; m_visits++;
    step_valid = 1; step_state = STATE_W'(s); step_data = d;
    @(negedge clk);
    step_valid = 0;
    check(rec_valid, "record valid");
    check(int'(pres_state) == m_prev, $sformatf("pres state %0d vs %0d", pres_state, m_prev));
    check(int'(next_state) == s, "next state");
    check(int'(curr_state) == a, $sformatf("curr state %0d vs %0d", curr_state, a));
    repeat (gap) @(negedge clk);
    if (gap > 0) check(int'(visits) == m_visits && int'(saved) == m_saved, "visit / saved counters");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    m_prev = 0; m_next = 0; m_visits = 0; m_saved = 0;
    step(1, 8'b01010101, 0);
    check(pres_state == 0 && curr_state == 1, "s1: pres s0, curr 01");
    step(2, 8'b01011101, 0);
    check(pres_state == 1 && curr_state == 2, "s2: pres s1, curr 02");
    step(3, 8'b01010101, 0);
    check(pres_state == 2 && curr_state == 1, "s3: pres s2, curr 01");
    @(negedge clk);
    check(used == 2 && saved == 1 && visits == 3, "three states in two words");
    for (int r = 0; r < 200; r++) begin
      clear = 1;
      @(negedge clk);
      clear = 0;
      mem.delete();
      m_prev = 0; m_next = 0; m_visits = 0; m_saved = 0;
      for (int t = 0; t < 10; t++)
        step($urandom_range(0, 7), DATA_W'($urandom_range(0, 6)), $urandom_range(0, 2));
      @(negedge clk);
      check(int'(visits) == m_visits && int'(saved) == m_saved, "final visit / saved counters");
      check(int'(used) == mem.size(), "memory words used");
      check(overflow == (m_visits - m_saved > DEPTH), "overflow flag");
      foreach (mem[i]) begin
        rd_addr = AW'(i + 1);
        #1 check(rd_data == mem[i], "stored output");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
