// tb_channel_ram: random writes and reads of the Channel RAM against an
// array model; checks that a read in the cycle of a write to the same
// address still returns the old word.
module tb_channel_ram;
  localparam int DEPTH = 7, WIDTH = 8, AW = 3;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  channel_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = WIDTH'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we    = $urandom_range(0, 1) == 1;
      waddr = AW'($urandom_range(0, DEPTH - 1));
      wdata = WIDTH'($urandom);
      raddr = ($urandom_range(0, 3) == 0) ? waddr : AW'($urandom_range(0, DEPTH - 1));
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("FAIL addr %0d: %h vs %h", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
