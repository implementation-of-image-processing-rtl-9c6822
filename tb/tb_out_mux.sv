// Self-checking test of out_mux: for random result bundles, each select code
// must pass exactly the matching algorithm's pixel.
module tb_out_mux;
  import img_pkg::*;
  disp_sel_e sel = SEL_CONTRAST;
  fu_result_t in_res = '0;
  pix_t out_pix;
  int checks = 0, failures = 0;

  out_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pix_t exp;
    for (int k = 0; k < 500; k++) begin
      in_res = fu_result_t'($urandom);
      for (int s = 0; s < 4; s++) begin
        sel = disp_sel_e'(s);
        #1;
        case (s)
          0: exp = in_res[31:24];
          1: exp = in_res[23:16];
          2: exp = in_res[15:8];
          default: exp = in_res[7:0];
        endcase
        checks++;
        if (out_pix !== exp) begin failures++; $display("FAIL sel=%0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
