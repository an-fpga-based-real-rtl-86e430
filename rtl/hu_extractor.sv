// hu_extractor: the moment-invariant stage of the classifier.
//
// Chains the four steps of the feature extraction: moment_accumulator
// scans the image and sums the raw moments, central_moments forms the
// centroid and the central moments, eta_normalise scales them by the
// object area, and hu_invariants produces the seven invariants I1..I7.
// Only the scan is sequential; the floating-point stages compute all their
// terms in parallel, as the design description does.
// Interface: start begins an extraction of the image held in the buffer
// read through rd_x/rd_y/rd_pix (one clock read latency). raw shows the
// integer moments once the scan is over. hu_valid pulses when hu holds the
// result, IMG_W*IMG_H + 7 clocks after the edge that samples start.
// busy is high from start until hu_valid.
module hu_extractor
  import ic_pkg::*;
#(
  parameter int IMG_W = 20,
  parameter int IMG_H = 20,
  localparam int XW = (IMG_W > 1) ? $clog2(IMG_W) : 1,
  localparam int YW = (IMG_H > 1) ? $clog2(IMG_H) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [XW-1:0] rd_x,
  output logic [YW-1:0] rd_y,
  input  logic          rd_pix,
  output raw_moments_t  raw,
  output logic          busy,
  output logic          hu_valid,
  output feature_vec_t  hu
);

  logic             acc_busy, acc_done, mu_valid, eta_valid;
  central_moments_t mu;
  eta_t             eta;
  logic             fp_busy;

  moment_accumulator #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_acc (
    .clk, .rst_n, .start(start & ~busy), .rd_x, .rd_y, .rd_pix,
    .moments(raw), .busy(acc_busy), .done(acc_done)
  );

  central_moments u_mu (
    .clk, .rst_n, .in_valid(acc_done), .raw, .out_valid(mu_valid), .mu
  );

  eta_normalise u_eta (
    .clk, .rst_n, .in_valid(mu_valid), .mu, .out_valid(eta_valid), .eta
  );

  hu_invariants u_hu (
    .clk, .rst_n, .in_valid(eta_valid), .eta, .out_valid(hu_valid), .hu
  );

  // floating-point stages in flight
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         fp_busy <= 1'b0;
    else if (acc_done)  fp_busy <= 1'b1;
    else if (hu_valid)  fp_busy <= 1'b0;
  end

  assign busy = acc_busy | fp_busy;

endmodule
