// tb_dedup_mem: first the three-state example (outputs 01010101,
// 01011101, 01010101 must land at addresses 1, 2, 1 in two words), then
// random back-to-back writes from a small alphabet against a model list,
// covering hits, new entries, overflow when full, clear and the read port.
module tb_dedup_mem;
  localparam int DEPTH = 4, DATA_W = 8, AW = 3;
  logic clk = 0, rst_n = 0, clear = 0, wr_valid = 0;
  logic [DATA_W-1:0] wr_data = '0, rd_data;
  logic res_valid, res_hit, res_new, overflow;
  logic [AW-1:0] res_addr, used, rd_addr = '0;
  int checks = 0, failures = 0, n_hit = 0, n_new = 0, n_ovf = 0;
  logic [DATA_W-1:0] model [$];
  bit model_ovf;

  dedup_mem dut (.*);

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

  // Drive one write in the coming cycle and check its answer in the next.
  task automatic write(logic [DATA_W-1:0] d);
    int exp_addr;
    bit exp_hit, exp_new;
    exp_addr = 0; exp_hit = 0; exp_new = 0;
    foreach (model[i]) if (model[i] == d && exp_addr == 0) exp_addr = i + 1;
    if (exp_addr != 0) exp_hit = 1;
    else if (model.size() < DEPTH) begin
      model.push_back(d); exp_addr = model.size(); exp_new = 1;
    end else model_ovf = 1;
    wr_valid = 1; wr_data = d;
    @(negedge clk);
    wr_valid = 0;
    check(res_valid, "result valid");
    check(int'(res_addr) == exp_addr, $sformatf("address of %b: %0d vs %0d", d, res_addr, exp_addr));
    check(res_hit == exp_hit && res_new == exp_new, "hit/new flags");
    check(overflow == model_ovf, "overflow flag");
    check(int'(used) == model.size(), "used count");
    if (res_hit) n_hit++;
    if (res_new) n_new++;
    if (!res_hit && !res_new) n_ovf++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    write(8'b01010101);
    write(8'b01011101);
    write(8'b01010101);
    check(used == 2, "example uses two words");
    rd_addr = 1; #1 check(rd_data == 8'b01010101, "word 1");
    rd_addr = 2; #1 check(rd_data == 8'b01011101, "word 2");
    for (int r = 0; r < 300; r++) begin
      clear = 1;
      @(negedge clk);
      clear = 0;
      model.delete();
      model_ovf = 0;
      check(used == 0 && !overflow, "cleared");
      for (int t = 0; t < 8; t++) write({4'($urandom_range(0, 2)), 4'($urandom_range(0, 1))});
      foreach (model[i]) begin
        rd_addr = AW'(i + 1);
        #1 check(rd_data == model[i], "stored word");
      end
      rd_addr = 0;
      #1 check(rd_data == '0, "address 0 reads zero");
    end
    check(n_hit > 0 && n_new > 0 && n_ovf > 0, "hit, new and overflow all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
