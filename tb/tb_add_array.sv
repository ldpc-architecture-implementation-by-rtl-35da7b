// tb_add_array: exhaustive sweep of the subtract half (Lambda - R_old) and
// the add half (Gamma + R_new) against integer arithmetic with
// saturation to [-128, 127].
module tb_add_array;
  import ldpc_pkg::*;
  llr_t lam_in, gamma_in, gamma_out, lam_out;
  msg_t r_old, r_new;
  int checks = 0, failures = 0;

  add_array dut (.*);

  function automatic int sat8(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -128; a < 128; a++) begin
      for (int r = -32; r < 32; r++) begin
        lam_in = llr_t'(a); r_old = msg_t'(r);
        gamma_in = llr_t'(a); r_new = msg_t'(r);
        #1;
        checks += 2;
        if (int'(gamma_out) != sat8(a - r)) begin
          failures++; $display("FAIL sub %0d-%0d = %0d", a, r, gamma_out);
        end
        if (int'(lam_out) != sat8(a + r)) begin
          failures++; $display("FAIL add %0d+%0d = %0d", a, r, lam_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
