// Output multiplexer: picks one of the four processed images (contrast,
// brightness, threshold, negative) by the select code of img_pkg::disp_sel_e.
// Purely combinational.
// A multiplexer on the output side is part of the architecture; the select
// codes are this design's.
module out_mux
  import img_pkg::*;
(
  input  disp_sel_e  sel,
  input  fu_result_t in_res,
  output pix_t       out_pix
);
  always_comb begin
    unique case (sel)
      SEL_CONTRAST: out_pix = in_res.contrast;
      SEL_BRIGHT:   out_pix = in_res.bright;
      SEL_THRESH:   out_pix = in_res.thresh;
      SEL_NEGATIVE: out_pix = in_res.negative;
      default:      out_pix = in_res.contrast;
    endcase
  end
endmodule
