// main_process_unit: controller of the CNN accelerator.
//
// Runs the whole inference, following the accelerator's loop nest:
//
//   load weights and biases (only once after reset)
//   load the input image
//   for each layer L:            read the layer definition from the ROM
//     for each input channel ci:
//       for each block (bx, by) of the input map, raster order:
//         load the padded 10x10 block                 (block_loader)
//         for each group of NCORE output channels co0:
//           fetch the NCORE kernels into the cores    (weights cache)
//           convolve, all cores in parallel           (conv_core x NCORE)
//           for each core k, for each result row:     (alu_row)
//             read the stored partial sum, add, add bias + ReLU when ci is
//             the last input channel, round, saturate, write back
//   average-pool the 32 channels of the last layer and return the arg-max
//
// Loading: words arrive on a valid/ready stream (ld_*).  After reset the
// first start consumes W_ROWS weight rows (72 bits, tap t in bits
// 8t+7..8t), then N_BIAS biases (bits 7..0), then IMG_ROWS image rows (64
// bits, pixel c in bits 8c+7..8c) in the feature-map cache order: channel
// by channel, the blocks of a channel in raster order, eight rows per block.
// A flag remembers that weights and biases are loaded; later starts read
// only an image.  An image is written to feature-map cache 0, layers then
// alternate between the two caches as the layer ROM says.
//
// Feature-map caches: in_sel selects which cache is the input side of the
// current phase; the other is the output side.  The input side is read by
// the block loader (outside this unit) and by the pooling unit (pool_rd_*).
// The output side is read on port A (stored partial sums) and written on
// port B (ALU results, image rows).
//
// done pulses with class_idx valid; busy is high from start to done.
// The original design gives the loop nest, the one-time load and the pooling; the
// stream format, the ALU schedule (one row per cycle, cores one after
// another, which is the serial store the original design reports as the
// bottleneck) and the state encoding are this implementation's own.
module main_process_unit
  import cnn_pkg::*;
#(
  parameter int unsigned NCORE    = 8,
  parameter int unsigned W_ROWS   = 199366,
  parameter int unsigned N_BIAS   = 3456,
  parameter int unsigned IMG_ROWS = 24576
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic [4:0]  class_idx,
  // load stream
  input  logic        ld_valid,
  output logic        ld_ready,
  input  logic [71:0] ld_data,
  // layer ROM
  output logic [4:0]  layer_idx,
  input  layer_def_t  def,
  // weights cache
  output logic        w_a_en,
  output logic        w_a_we,
  output logic [17:0] w_a_addr,
  output wrow_t       w_a_wdata,
  input  wrow_t       w_a_rdata,
  output logic        w_b_en,
  output logic [17:0] w_b_addr,
  input  wrow_t       w_b_rdata,
  // bias cache
  output logic        b_en,
  output logic        b_we,
  output logic [11:0] b_addr,
  output act_t        b_wdata,
  input  act_t        b_rdata,
  // feature-map caches
  output logic        in_sel,
  output logic        pool_rd_en,
  output logic [16:0] pool_rd_addr,
  input  fm_row_t     pool_rd_data,
  output logic        o_a_en,
  output logic [16:0] o_a_addr,
  input  fm_row_t     o_a_rdata,
  output logic        o_b_en,
  output logic [7:0]  o_b_be,
  output logic [16:0] o_b_addr,
  output fm_row_t     o_b_wdata,
  // block loader
  output logic        ld_blk_start,
  output logic [9:0]  blk_ch,
  output logic [4:0]  blk_bx,
  output logic [4:0]  blk_by,
  output logic [2:0]  blk_lg_bps,
  input  logic        ld_blk_done,
  // convolution cores
  output logic [NCORE-1:0] k_load,
  output kernel_t     k_in [NCORE],
  output logic        conv_start,
  input  logic        conv_done,
  input  acc_t        core_out [NCORE][BLK][BLK],
  // event flags for observation: one cycle each
  output logic        ev_sat,
  output logic        ev_relu
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD_W, S_LOAD_B, S_LOAD_IMG, S_LAYER_RD, S_LAYER, S_BLOCK,
    S_KFETCH, S_CONV, S_ALU, S_NEXT, S_POOL, S_DONE
  } state_t;

  localparam int unsigned KSTEPS3 = (NCORE + 1) / 2;

  state_t      state;
  logic        wb_loaded;
  logic [17:0] ld_cnt;
  logic [9:0]  ci, co0;
  logic [4:0]  bx, by, last_b;
  logic [2:0]  kstep;
  logic        kresp;
  logic [2:0]  kresp_step;
  logic        kissue_done;
  // ALU pipeline
  logic [2:0]  ak;       // core being stored
  logic [2:0]  ay;       // result row
  logic        a_issue;  // issue stage active
  logic        r_valid;
  logic [2:0]  r_k;
  logic [2:0]  r_y;
  logic [16:0] r_addr;
  logic [7:0]  r_mask;
  logic        pool_start, pool_busy, pool_done;
  logic [4:0]  pool_class;
  logic signed [15:0] pool_best;

  // memory controller
  logic [17:0] mc_w_row_a, mc_w_row_b;
  logic [3:0]  mc_w_lane;
  logic [11:0] mc_bias_addr;
  logic [16:0] mc_dst_addr;
  logic [7:0]  mc_dst_mask;

  mem_ctrl u_mc (
    .def(def), .ci(ci), .co0(co0), .bx(bx), .by(by), .kstep(kstep),
    .k({1'b0, ak}), .y(ay),
    .w_row_a(mc_w_row_a), .w_row_b(mc_w_row_b), .w_lane(mc_w_lane),
    .bias_addr(mc_bias_addr), .dst_addr(mc_dst_addr), .dst_mask(mc_dst_mask)
  );

  avg_pool_argmax #(.NCH(N_CLASSES)) u_pool (
    .clk, .rst_n, .start(pool_start),
    .rd_en(pool_rd_en), .rd_addr(pool_rd_addr), .rd_data(pool_rd_data),
    .busy(pool_busy), .done(pool_done), .class_idx(pool_class),
    .best_sum(pool_best)
  );

  logic first_ci, last_ci, stride2;
  assign first_ci = (ci == 10'd0);
  assign last_ci  = (ci == def.net.ch_in - 10'd1);
  assign stride2  = def.net.stride2;
  assign last_b   = 5'((1 << def.net.lg_bps) - 1);

  // ---------------------------------------------------------------- ALU
  acc_t    alu_conv [BLK];
  fm_row_t alu_res;
  logic    alu_sat, alu_relu;

  always_comb begin
    for (int c = 0; c < BLK; c++) alu_conv[c] = core_out[r_k][r_y][c];
    if (stride2) begin
      // keep even columns; place them in the half of the row given by bx
      for (int j = 0; j < 4; j++) begin
        alu_conv[j]     = core_out[r_k][r_y][2*j];
        alu_conv[j + 4] = core_out[r_k][r_y][2*j];
      end
    end
  end

  alu_row u_alu (
    .conv(alu_conv), .stored(o_a_rdata), .bias(b_rdata),
    .fl_in(def.net.fl_in), .fl_w(def.net.fl_w), .fl_out(def.net.fl_out),
    .first(first_ci), .last(last_ci),
    .res(alu_res), .sat(alu_sat), .relu(alu_relu)
  );

  assign ev_sat  = r_valid && alu_sat;
  assign ev_relu = r_valid && alu_relu;

  // ---------------------------------------------------------------- kernels
  wrow_t pair [2];
  always_comb begin
    pair[0] = w_a_rdata;
    pair[1] = w_b_rdata;
    for (int k = 0; k < NCORE; k++) begin
      k_load[k] = 1'b0;
      k_in[k]   = '0;
      if (kresp) begin
        if (def.net.k3) begin
          if (k / 2 == int'(kresp_step)) begin
            k_load[k] = 1'b1;
            k_in[k]   = pair[k % 2];
          end
        end else begin
          k_load[k] = 1'b1;
          // 1x1: the weight is the centre tap of a 3x3 kernel
          k_in[k][4] = (int'(mc_w_lane) + k < KTAPS) ?
                       pair[0][int'(mc_w_lane) + k] :
                       pair[1][int'(mc_w_lane) + k - KTAPS];
        end
      end
    end
  end

  // ---------------------------------------------------------------- datapath controls
  always_comb begin
    ld_ready     = (state == S_LOAD_W) || (state == S_LOAD_B) || (state == S_LOAD_IMG);
    w_a_en       = 1'b0;
    w_a_we       = 1'b0;
    w_a_addr     = mc_w_row_a;
    w_a_wdata    = wrow_t'(ld_data);
    w_b_en       = 1'b0;
    w_b_addr     = mc_w_row_b;
    b_en         = 1'b0;
    b_we         = 1'b0;
    b_addr       = mc_bias_addr;
    b_wdata      = act_t'(ld_data[7:0]);
    in_sel       = def.src_buf;
    o_a_en       = 1'b0;
    o_a_addr     = mc_dst_addr;
    o_b_en       = 1'b0;
    o_b_be       = r_mask;
    o_b_addr     = r_addr;
    o_b_wdata    = alu_res;
    blk_ch       = ci;
    blk_bx       = bx;
    blk_by       = by;
    blk_lg_bps   = def.net.lg_bps;

    case (state)
      S_LOAD_W: begin
        w_a_en   = ld_valid;
        w_a_we   = 1'b1;
        w_a_addr = ld_cnt;
      end
      S_LOAD_B: begin
        b_en   = ld_valid;
        b_we   = 1'b1;
        b_addr = 12'(ld_cnt);
      end
      S_LOAD_IMG: begin
        in_sel    = 1'b1;              // cache 0 is the output side
        o_b_en    = ld_valid;
        o_b_be    = 8'hFF;
        o_b_addr  = 17'(ld_cnt);
        o_b_wdata = fm_row_t'(ld_data[63:0]);
      end
      S_KFETCH: begin
        w_a_en = !kissue_done;
        w_b_en = !kissue_done;
      end
      S_ALU: begin
        o_a_en = a_issue && !first_ci;
        b_en   = a_issue && last_ci;
        o_b_en = r_valid;
      end
      S_POOL, S_DONE: in_sel = 1'b0;
      default: ;
    endcase
  end

  assign busy      = (state != S_IDLE);
  assign class_idx = pool_class;

  // ---------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      wb_loaded    <= 1'b0;
      ld_cnt       <= '0;
      layer_idx    <= '0;
      ci           <= '0;
      co0          <= '0;
      bx           <= '0;
      by           <= '0;
      kstep        <= '0;
      kresp        <= 1'b0;
      kresp_step   <= '0;
      kissue_done  <= 1'b0;
      ak           <= '0;
      ay           <= '0;
      a_issue      <= 1'b0;
      r_valid      <= 1'b0;
      r_k          <= '0;
      r_y          <= '0;
      r_addr       <= '0;
      r_mask       <= '0;
      ld_blk_start <= 1'b0;
      conv_start   <= 1'b0;
      pool_start   <= 1'b0;
      done         <= 1'b0;
    end else begin
      ld_blk_start <= 1'b0;
      conv_start   <= 1'b0;
      pool_start   <= 1'b0;
      done         <= 1'b0;
      kresp        <= 1'b0;

      case (state)
        S_IDLE: if (start) begin
          ld_cnt <= '0;
          state  <= wb_loaded ? S_LOAD_IMG : S_LOAD_W;
        end

        S_LOAD_W: if (ld_valid) begin
          ld_cnt <= ld_cnt + 18'd1;
          if (ld_cnt == 18'(W_ROWS - 1)) begin
            ld_cnt <= '0;
            state  <= S_LOAD_B;
          end
        end

        S_LOAD_B: if (ld_valid) begin
          ld_cnt <= ld_cnt + 18'd1;
          if (ld_cnt == 18'(N_BIAS - 1)) begin
            ld_cnt    <= '0;
            wb_loaded <= 1'b1;
            state     <= S_LOAD_IMG;
          end
        end

        S_LOAD_IMG: if (ld_valid) begin
          ld_cnt <= ld_cnt + 18'd1;
          if (ld_cnt == 18'(IMG_ROWS - 1)) begin
            layer_idx <= '0;
            state     <= S_LAYER_RD;
          end
        end

        S_LAYER_RD: state <= S_LAYER;      // ROM read latency

        S_LAYER: begin
          ci  <= '0;
          bx  <= '0;
          by  <= '0;
          co0 <= '0;
          ld_blk_start <= 1'b1;
          state <= S_BLOCK;
        end

        S_BLOCK: if (ld_blk_done) begin
          kstep       <= '0;
          kissue_done <= 1'b0;
          state       <= S_KFETCH;
        end

        S_KFETCH: begin
          if (!kissue_done) begin
            kresp      <= 1'b1;
            kresp_step <= kstep;
            if (!def.net.k3 || int'(kstep) == KSTEPS3 - 1) kissue_done <= 1'b1;
            else kstep <= kstep + 3'd1;
          end else begin
            // last kernel data is being loaded this cycle
            conv_start <= 1'b1;
            state      <= S_CONV;
          end
        end

        S_CONV: if (conv_done) begin
          ak      <= '0;
          ay      <= '0;
          a_issue <= 1'b1;
          state   <= S_ALU;
        end

        S_ALU: begin
          r_valid <= a_issue;
          r_k     <= ak;
          r_y     <= ay;
          r_addr  <= mc_dst_addr;
          r_mask  <= mc_dst_mask;
          if (a_issue) begin
            if ((stride2 && ay == 3'd6) || ay == 3'd7) begin
              ay <= '0;
              if (int'(ak) == NCORE - 1) a_issue <= 1'b0;
              else ak <= ak + 3'd1;
            end else begin
              ay <= stride2 ? ay + 3'd2 : ay + 3'd1;
            end
          end else if (r_valid) begin
            // last row written this cycle
            r_valid <= 1'b0;
            state   <= S_NEXT;
          end
        end

        S_NEXT: begin
          // advance co group -> block -> input channel -> layer
          if (co0 + 10'(NCORE) < def.net.ch_out) begin
            co0         <= co0 + 10'(NCORE);
            kstep       <= '0;
            kissue_done <= 1'b0;
            state       <= S_KFETCH;
          end else begin
            co0 <= '0;
            state <= S_BLOCK;
            ld_blk_start <= 1'b1;
            if (bx != last_b) bx <= bx + 5'd1;
            else begin
              bx <= '0;
              if (by != last_b) by <= by + 5'd1;
              else begin
                by <= '0;
                if (!last_ci) ci <= ci + 10'd1;
                else begin
                  ld_blk_start <= 1'b0;
                  if (int'(layer_idx) == N_LAYERS - 1) begin
                    pool_start <= 1'b1;
                    state      <= S_POOL;
                  end else begin
                    layer_idx <= layer_idx + 5'd1;
                    state     <= S_LAYER_RD;
                  end
                end
              end
            end
          end
        end

        S_POOL: if (pool_done) begin
          done  <= 1'b1;
          state <= S_DONE;
        end

        S_DONE: state <= S_IDLE;

        default: state <= S_IDLE;
      endcase
    end
  end

  // Every layer's output channel count is a multiple of 16, and the 1x1
  // kernel fetch needs a group's weights within two weight rows.
  if (NCORE != 1 && NCORE != 2 && NCORE != 4 && NCORE != 8) begin : g_bad_ncore
    $error("NCORE must be 1, 2, 4 or 8");
  end

endmodule
