// Spatially parallel image processing functional unit. One input pixel per
// cycle is broadcast to four independent point-operation units - contrast
// stretching, brightness control, threshold and negative - which work at the
// same time, so every cycle yields four enhanced pixels (coarse-grain spatial
// parallelism). The four units have the same one-cycle latency, so the
// results leave together as one fu_result_t with a single valid.
// Tuning values come in as a tune_t and may change between frames.
module spatial_fu
  import img_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  pix_t       in_pix,
  input  tune_t      tune,
  output logic       out_valid,
  output fu_result_t out_res
);
  logic [3:0] v;

  contrast_stretch u_contrast (
    .clk, .rst_n, .in_valid, .in_pix,
    .low(tune.cs_low), .gain(tune.cs_gain),
    .out_valid(v[0]), .out_pix(out_res.contrast)
  );

  brightness_ctrl u_bright (
    .clk, .rst_n, .in_valid, .in_pix,
    .offset(tune.br_offset),
    .out_valid(v[1]), .out_pix(out_res.bright)
  );

  threshold_op u_thresh (
    .clk, .rst_n, .in_valid, .in_pix,
    .level(tune.th_level),
    .out_valid(v[2]), .out_pix(out_res.thresh)
  );

  negative_op u_negative (
    .clk, .rst_n, .in_valid, .in_pix,
    .out_valid(v[3]), .out_pix(out_res.negative)
  );

  assign out_valid = v[0];

  // The four units must stay in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) v == '0 || v == '1);
endmodule
