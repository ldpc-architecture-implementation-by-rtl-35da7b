// tb_check_node_unit: feeds rows of four random variable-to-check messages
// (including zero and saturated values), and while the next row is being
// accumulated asks for the message of each edge of the previous one. The
// answers are compared with the check update computed in floating point by
// the reference model (sign product and Phi-sum over the other edges).
module tb_check_node_unit;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  logic clk = 0, rst_n = 0, acc_valid = 0, acc_first = 0, acc_last = 0;
  llr_t acc_q = '0, out_q = '0;
  msg_t r_out;
  int checks = 0, failures = 0;

  check_node_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pick();
    case ($urandom_range(0, 9))
      0: return 0;
      1: return -128;
      2: return 127;
      3: return int'($urandom_range(0, 255)) - 128;
      default: return int'($urandom_range(0, 40)) - 20;
    endcase
  endfunction

  function automatic int expect_r(int q [4], int k);
    int s, sg, mag;
    s = 0; sg = 0;
    for (int j = 0; j < 4; j++) if (j != k) begin
      s += phi_ref(mag31(q[j]));
      sg ^= (q[j] < 0) ? 1 : 0;
    end
    mag = phi_ref((s > 31) ? 31 : s);
    return (sg != 0) ? -mag : mag;
  endfunction

  // Row t is accumulated while row t-1 is output, edge by edge, as in the
  // decoder's overlapped schedule; now and then a gap separates rows.
  initial begin
    int q [4], p [4];
    bit have_p;
    repeat (2) @(posedge clk);
    rst_n = 1;
    have_p = 0;
    for (int t = 0; t <= 3000; t++) begin
      for (int k = 0; k < 4; k++) q[k] = pick();
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        acc_valid = (t < 3000);
        acc_first = (k == 0); acc_last = (k == 3); acc_q = llr_t'(q[k]);
        if (have_p) begin
          out_q = llr_t'(p[k]);
          #1;
          checks++;
          if (int'(r_out) != expect_r(p, k)) begin
            failures++;
            $display("FAIL row %p edge %0d: %0d vs %0d", p, k, r_out, expect_r(p, k));
          end
        end
      end
      p = q;
      have_p = 1;
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        acc_valid = 0;
        acc_q = llr_t'(pick());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
