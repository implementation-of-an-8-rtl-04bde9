// cnn_accel: 8-bit dynamic fixed-point CNN accelerator for hand-sign
// classification (top level).
//
// The whole network -- all weights and biases, the input image and every
// intermediate activation volume -- lives in on-chip memories, so inference
// needs no external memory once the weights are loaded.  The input image is
// 3x256x256 8-bit pixels; the result is the index (0..31) of the winning
// class of the last layer's average pooling, the first 26 classes being the
// letters of the Swedish fingerspelling alphabet.
//
// Blocks:
//   main_process_unit  loop control, loading, ALU sequencing, pooling
//   layer_def_rom      per-layer hyper-parameters and fractional lengths
//   weights_cache      W_ROWS x 9 weights, dual port
//   bias_cache         N_BIAS biases
//   fm_cache x2        ping-pong feature-map caches, 8 column partitions:
//                      cache 0 (FM0_ROWS rows) holds the image and the
//                      squeeze/conv10 outputs, cache 1 (FM1_ROWS rows) the
//                      conv1 and expand outputs
//   block_loader       padded 10x10 input block register array
//   conv_core x NCORE  output channels convolved in parallel
//
// Interface: after reset, pulse start and stream weights, biases and the
// image on ld_valid/ld_ready/ld_data (format in main_process_unit); done
// pulses when class_idx is valid.  Later starts stream only an image.
// Latency at the default sizes is about 21.6 million cycles after the load.
// The cache sizes, block size, number of cores and arithmetic follow the
// accelerator described for the FPGA implementation; the load stream
// stands in for the host's external memory, which is not part of the
// design.
//
// The reset is asynchronous in the logic; the assertions at the end also
// use it, synchronously, to stay quiet during reset, which lint reports as
// a reset used both ways.  It has no effect on the circuit.
module cnn_accel
  import cnn_pkg::*;
#(
  parameter int unsigned NCORE    = 8,
  parameter int unsigned W_ROWS   = 199366,
  parameter int unsigned N_BIAS   = 3456,
  parameter int unsigned FM0_ROWS = 24576,
  parameter int unsigned FM1_ROWS = 131072
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        ld_valid,
  output logic        ld_ready,
  input  logic [71:0] ld_data,
  output logic        busy,
  output logic        done,
  output logic [4:0]  class_idx
);

  localparam int unsigned IMG_ROWS = 3 * 256 * 256 / BLK;
  localparam int unsigned AW0 = $clog2(FM0_ROWS);
  localparam int unsigned AW1 = $clog2(FM1_ROWS);
  localparam int unsigned WAW = $clog2(W_ROWS);
  localparam int unsigned BAW = $clog2(N_BIAS);

  logic [4:0]  layer_idx;
  layer_def_t  def;

  logic        w_a_en, w_a_we, w_b_en;
  logic [17:0] w_a_addr, w_b_addr;
  wrow_t       w_a_wdata, w_a_rdata, w_b_rdata;
  logic        b_en, b_we;
  logic [11:0] b_addr;
  act_t        b_wdata, b_rdata;

  logic        in_sel;
  logic        pool_rd_en;
  logic [16:0] pool_rd_addr;
  logic        o_a_en, o_b_en;
  logic [16:0] o_a_addr, o_b_addr;
  logic [7:0]  o_b_be;
  fm_row_t     o_b_wdata;
  fm_row_t     in_a_rdata, in_b_rdata, o_a_rdata;

  logic        lb_start, lb_done, lb_busy;
  logic [9:0]  lb_ch;
  logic [4:0]  lb_bx, lb_by;
  logic [2:0]  lb_lg;
  logic        lb_a_en, lb_b_en;
  logic [16:0] lb_a_addr, lb_b_addr;
  act_t        blk [10][10];

  logic [NCORE-1:0] k_load;
  kernel_t     k_in [NCORE];
  logic        conv_start;
  logic [NCORE-1:0] core_busy, core_done;
  acc_t        core_out [NCORE][BLK][BLK];
  logic        ev_sat, ev_relu;

  main_process_unit #(
    .NCORE(NCORE), .W_ROWS(W_ROWS), .N_BIAS(N_BIAS), .IMG_ROWS(IMG_ROWS)
  ) u_main (
    .clk, .rst_n, .start, .busy, .done, .class_idx,
    .ld_valid, .ld_ready, .ld_data,
    .layer_idx, .def,
    .w_a_en, .w_a_we, .w_a_addr, .w_a_wdata, .w_a_rdata,
    .w_b_en, .w_b_addr, .w_b_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata,
    .in_sel, .pool_rd_en, .pool_rd_addr, .pool_rd_data(in_a_rdata),
    .o_a_en, .o_a_addr, .o_a_rdata,
    .o_b_en, .o_b_be, .o_b_addr, .o_b_wdata,
    .ld_blk_start(lb_start), .blk_ch(lb_ch), .blk_bx(lb_bx), .blk_by(lb_by),
    .blk_lg_bps(lb_lg), .ld_blk_done(lb_done),
    .k_load, .k_in, .conv_start, .conv_done(core_done[0]), .core_out,
    .ev_sat, .ev_relu
  );

  layer_def_rom u_rom (.clk, .idx(layer_idx), .def);

  weights_cache #(.ROWS(W_ROWS)) u_wcache (
    .clk,
    .a_en(w_a_en), .a_we(w_a_we), .a_addr(WAW'(w_a_addr)), .a_wdata(w_a_wdata),
    .a_rdata(w_a_rdata),
    .b_en(w_b_en), .b_addr(WAW'(w_b_addr)), .b_rdata(w_b_rdata)
  );

  bias_cache #(.ENTRIES(N_BIAS)) u_bcache (
    .clk, .en(b_en), .we(b_we), .addr(BAW'(b_addr)), .wdata(b_wdata),
    .rdata(b_rdata)
  );

  block_loader u_loader (
    .clk, .rst_n, .start(lb_start), .ch(lb_ch), .bx(lb_bx), .by(lb_by),
    .lg_bps(lb_lg),
    .a_en(lb_a_en), .a_addr(lb_a_addr), .a_rdata(in_a_rdata),
    .b_en(lb_b_en), .b_addr(lb_b_addr), .b_rdata(in_b_rdata),
    .busy(lb_busy), .done(lb_done), .blk
  );

  for (genvar k = 0; k < NCORE; k++) begin : g_core
    conv_core u_core (
      .clk, .rst_n, .k_load(k_load[k]), .k_in(k_in[k]), .blk,
      .start(conv_start), .busy(core_busy[k]), .done(core_done[k]),
      .out(core_out[k])
    );
  end

  // ---- feature-map caches: input side / output side selected by in_sel
  logic        in_a_en, in_b_en;
  logic [16:0] in_a_addr, in_b_addr;
  logic        f0_a_en, f0_a_we, f0_b_en, f0_b_we;
  logic        f1_a_en, f1_a_we, f1_b_en, f1_b_we;
  logic [16:0] f0_a_addr, f0_b_addr, f1_a_addr, f1_b_addr;
  logic [7:0]  f0_b_be, f1_b_be;
  fm_row_t     f0_a_rdata, f0_b_rdata, f1_a_rdata, f1_b_rdata;

  always_comb begin
    in_a_en   = lb_a_en | pool_rd_en;
    in_a_addr = pool_rd_en ? pool_rd_addr : lb_a_addr;
    in_b_en   = lb_b_en;
    in_b_addr = lb_b_addr;
    if (in_sel == 1'b0) begin
      {f0_a_en, f0_a_we, f0_a_addr} = {in_a_en, 1'b0, in_a_addr};
      {f0_b_en, f0_b_we, f0_b_addr, f0_b_be} = {in_b_en, 1'b0, in_b_addr, 8'h00};
      {f1_a_en, f1_a_we, f1_a_addr} = {o_a_en, 1'b0, o_a_addr};
      {f1_b_en, f1_b_we, f1_b_addr, f1_b_be} = {o_b_en, 1'b1, o_b_addr, o_b_be};
      in_a_rdata = f0_a_rdata;
      in_b_rdata = f0_b_rdata;
      o_a_rdata  = f1_a_rdata;
    end else begin
      {f1_a_en, f1_a_we, f1_a_addr} = {in_a_en, 1'b0, in_a_addr};
      {f1_b_en, f1_b_we, f1_b_addr, f1_b_be} = {in_b_en, 1'b0, in_b_addr, 8'h00};
      {f0_a_en, f0_a_we, f0_a_addr} = {o_a_en, 1'b0, o_a_addr};
      {f0_b_en, f0_b_we, f0_b_addr, f0_b_be} = {o_b_en, 1'b1, o_b_addr, o_b_be};
      in_a_rdata = f1_a_rdata;
      in_b_rdata = f1_b_rdata;
      o_a_rdata  = f0_a_rdata;
    end
  end

  fm_cache #(.DEPTH(FM0_ROWS)) u_fm0 (
    .clk,
    .a_en(f0_a_en), .a_we(f0_a_we), .a_be(8'h00), .a_addr(AW0'(f0_a_addr)),
    .a_wdata('0), .a_rdata(f0_a_rdata),
    .b_en(f0_b_en), .b_we(f0_b_we), .b_be(f0_b_be), .b_addr(AW0'(f0_b_addr)),
    .b_wdata(o_b_wdata), .b_rdata(f0_b_rdata)
  );

  fm_cache #(.DEPTH(FM1_ROWS)) u_fm1 (
    .clk,
    .a_en(f1_a_en), .a_we(f1_a_we), .a_be(8'h00), .a_addr(AW1'(f1_a_addr)),
    .a_wdata('0), .a_rdata(f1_a_rdata),
    .b_en(f1_b_en), .b_we(f1_b_we), .b_be(f1_b_be), .b_addr(AW1'(f1_b_addr)),
    .b_wdata(o_b_wdata), .b_rdata(f1_b_rdata)
  );

  // the cores run in lock step; the loader never overlaps a convolution
  a_cores_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    core_done == '0 || core_done == '1);
  a_loader_idle_in_conv: assert property (@(posedge clk) disable iff (!rst_n)
    !(lb_busy && core_busy[0]));

endmodule
