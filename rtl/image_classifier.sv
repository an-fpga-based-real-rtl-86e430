// image_classifier: real-time object classifier, top level.
//
// A binary image is classified by its shape. The image, uploaded pixel by
// pixel into image_buffer or binarised there from a grey image by
// otsu_thresholder, is reduced by hu_extractor to Hu's seven moment
// invariants, numbers that stay the same when the object is moved,
// rotated or scaled. kohonen_classifier then compares them with the seven
// weights of each of eight neurons of a trained Kohonen map, picks the
// neuron at the smallest Manhattan distance and outputs that neuron's
// identification tag as the class. The trained map (weights and tags) is
// loaded through the weight port into weight_memory.
// Interface: pix_* writes image pixels, w_* writes weight-map words
// (address 8n+k: weight k of neuron n, 8n+7: its tag). A start pulse while
// idle classifies the stored image; hu_valid pulses when hu holds the
// invariants and class_valid when class_tag, winner and min_dist hold the
// result. busy is high from start to class_valid. g_* uploads a grey
// image instead; a binarise pulse while idle thresholds it into the image
// buffer (bin_done, threshold and thr_found report the outcome) and then
// starts the classification by itself. busy covers that whole run.
// Binary pixels written through pix_* during binarisation are lost.
// Timing at the defaults: hu_valid 407 clocks and class_valid 440 clocks
// after the edge that samples start; after a binarise pulse bin_done
// comes 1056 clocks after its sampling edge and the classification follows
// as after a start on the next clock.
// The chain of blocks follows the design description; the camera and the
// board memories that surround it there are outside this module, replaced
// by the upload ports. Starting the classification from the end of the
// binarisation is this design's own choice.
module image_classifier
  import ic_pkg::*;
#(
  parameter int IMG_W       = 20,
  parameter int IMG_H       = 20,
  parameter int NUM_NEURONS = 8,
  parameter int FP_LAT      = 6,
  parameter int GREY_W      = 8,
  localparam int XW = (IMG_W > 1) ? $clog2(IMG_W) : 1,
  localparam int YW = (IMG_H > 1) ? $clog2(IMG_H) : 1,
  localparam int IW = (NUM_NEURONS > 1) ? $clog2(NUM_NEURONS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // image upload
  input  logic          pix_we,
  input  logic [XW-1:0] pix_x,
  input  logic [YW-1:0] pix_y,
  input  logic          pix_val,

  input  logic              g_we,
  input  logic [XW-1:0]     g_x,
  input  logic [YW-1:0]     g_y,
  input  logic [GREY_W-1:0] g_grey,
  input  logic              binarise,
  output logic              bin_done,
  output logic              thr_found,
  output logic [GREY_W-1:0] threshold,
  // weight map load
  input  logic          w_we,
  input  logic [11:0]   w_addr,
  input  logic [31:0]   w_data,
  // control and results
  input  logic          start,
  output logic          busy,
  output raw_moments_t  raw,
  output logic          hu_valid,
  output feature_vec_t  hu,
  output logic          class_valid,
  output logic [31:0]   class_tag,
  output logic [IW-1:0] winner,
  output fp32_t         min_dist
);

  logic [XW-1:0] rd_x;
  logic [YW-1:0] rd_y;
  logic          rd_pix, ext_busy, cls_busy, ot_busy;
  logic          ot_we, ot_pix;
  logic [XW-1:0] ot_x;
  logic [YW-1:0] ot_y;
  feature_vec_t  weights [NUM_NEURONS];
  logic [IW-1:0] tag_idx;
  logic [31:0]   tag;

  otsu_thresholder #(.IMG_W(IMG_W), .IMG_H(IMG_H), .GREY_W(GREY_W)) u_otsu (
    .clk, .rst_n, .in_we(g_we), .in_x(g_x), .in_y(g_y), .in_grey(g_grey),
    .start(binarise & ~busy & ~bin_done), .busy(ot_busy), .out_we(ot_we), .out_x(ot_x),
    .out_y(ot_y), .out_pix(ot_pix), .done(bin_done), .found(thr_found), .threshold
  );

  // The thresholder's writes take priority over the binary upload port.
  image_buffer #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_img (
    .clk, .rst_n, .wr_en(ot_we | pix_we), .wr_x(ot_we ? ot_x : pix_x),
    .wr_y(ot_we ? ot_y : pix_y), .wr_pix(ot_we ? ot_pix : pix_val),
    .rd_x, .rd_y, .rd_pix
  );

  hu_extractor #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_ext (
    .clk, .rst_n, .start((start & ~busy) | bin_done), .rd_x, .rd_y, .rd_pix,
    .raw, .busy(ext_busy), .hu_valid, .hu
  );

  weight_memory #(.NUM_NEURONS(NUM_NEURONS), .ADDR_W(12)) u_wmem (
    .clk, .rst_n, .wr_en(w_we), .wr_addr(w_addr), .wr_data(w_data),
    .weights, .tag_idx, .tag
  );

  kohonen_classifier #(.NUM_NEURONS(NUM_NEURONS), .FP_LAT(FP_LAT)) u_cls (
    .clk, .rst_n, .in_valid(hu_valid), .hu, .weights, .tag_idx, .tag,
    .busy(cls_busy), .class_valid, .class_tag, .winner, .min_dist
  );

  assign busy = ext_busy | cls_busy | ot_busy;

endmodule
