// resize_engine: one resizing process (one display window).
//
// The source image is read in block-in order: 11 x 11 blocks whose origins
// advance by 11 - overlap pixels, so that consecutive blocks overlap as
// overlap-save filtering requires. Each block is filtered in two passes on
// this window's lane of the shared filter set:
//   horizontal pass: each of the 11 block rows is one section; its kept,
//     post-processed outputs are written to the internal buffer at
//     row*33 + index (at most 11 x 33 = 363 bytes);
//   vertical pass: each buffer column that the horizontal pass filled is one
//     section of 11 samples read back from the buffer; its kept outputs are
//     the window's output pixels.
// The lane is reconfigured between the passes (cfg_h, then cfg_v). Source
// reads beyond the right or bottom edge are clamped to the last column or
// row. Each output pixel leaves with its coordinates; a block of the output
// is keep_h wide and keep_v high, and blocks tile the output image.
// The source memory answers a read RD_LAT cycles after src_rd.
// frame_start (while idle) starts a frame; frame_done pulses at its end.
// Block-in two-pass filtering follows the published design; edge clamping,
// the buffer layout and the interfaces are this design's own choices.
module resize_engine
  import resizer_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       frame_start,
  input  logic [9:0] src_w,
  input  logic [9:0] src_h,
  input  lane_cfg_t  cfg_h,
  input  lane_cfg_t  cfg_v,
  output logic       busy,
  output logic       frame_done,
  // block-in reads of the source image
  output logic       src_rd,
  output logic [9:0] src_x,
  output logic [9:0] src_y,
  input  pix_t       src_data,
  // this window's lane of the filter set
  output lane_cfg_t  lane_cfg,
  output logic       lane_clr,
  output samp_t      lane_in,
  input  samp_t      lane_out,
  // resized pixels
  output logic       out_valid,
  output logic [10:0] out_x,
  output logic [10:0] out_y,
  output pix_t       out_pix
);

  typedef enum logic [2:0] {E_IDLE, E_HSTART, E_HWAIT, E_VSTART, E_VWAIT, E_DONE} estate_e;

  estate_e     state;
  logic        hpass;
  logic [9:0]  bx0, by0;          // block origin in the source
  logic [10:0] obx, oby;          // block origin in the output
  logic [3:0]  row;               // horizontal pass: block row
  logic [5:0]  col;               // vertical pass: buffer column
  logic [5:0]  keep_h, keep_v;    // kept outputs per row / per column
  logic [3:0]  step_h, step_v;

  logic        sc_start, sc_busy, sc_done, sc_req, sc_lane_valid, sc_keep;
  logic [3:0]  sc_idx;
  logic [5:0]  sc_keep_idx;
  logic        pp_valid;
  pix_t        pp_pix;

  logic        buf_en, buf_we;
  logic [8:0]  buf_addr;
  pix_t        buf_rdata;

  logic [10:0] sx, sy;
  logic [5:0]  keep_v_now;        // keep_v including an output kept this cycle

  assign hpass    = (state == E_HSTART) || (state == E_HWAIT);
  assign lane_cfg = hpass ? cfg_h : cfg_v;
  assign busy     = (state != E_IDLE);
  assign sc_start = (state == E_HSTART) || (state == E_VSTART);
  assign step_h   = 4'(SEC_N) - 4'(cfg_h.overlap);
  assign step_v   = 4'(SEC_N) - 4'(cfg_v.overlap);

  section_ctrl u_sctrl (
    .clk, .rst_n, .start(sc_start), .cfg(lane_cfg), .busy(sc_busy), .done(sc_done),
    .req(sc_req), .req_idx(sc_idx), .lane_valid(sc_lane_valid), .lane_clr,
    .pp_valid, .keep(sc_keep), .keep_idx(sc_keep_idx)
  );

  post_process u_post (
    .clk, .rst_n, .gain(lane_cfg.gain), .in_s(lane_out),
    .out_valid(pp_valid), .out_pix(pp_pix)
  );

  sram_512x8 u_buf (
    .clk, .en(buf_en), .we(buf_we), .addr(buf_addr), .wdata(pp_pix), .rdata(buf_rdata)
  );

  // Source read with edge clamping.
  always_comb begin
    sx = 11'(bx0) + 11'(sc_idx);
    sy = 11'(by0) + 11'(row);
    if (sx >= 11'(src_w)) sx = 11'(src_w) - 11'd1;
    if (sy >= 11'(src_h)) sy = 11'(src_h) - 11'd1;
  end
  assign src_rd = hpass && sc_req;
  assign src_x  = sx[9:0];
  assign src_y  = sy[9:0];

  // Internal buffer: written by the horizontal pass, read by the vertical.
  always_comb begin
    buf_we   = hpass && sc_keep;
    buf_en   = buf_we || (!hpass && sc_req);
    buf_addr = hpass ? 9'(row) * 9'(BUF_ROW) + 9'(sc_keep_idx)
                     : 9'(sc_idx) * 9'(BUF_ROW) + 9'(col);
  end

  // Lane input: the sample read RD_LAT cycles ago.
  always_comb begin
    lane_in.valid = sc_lane_valid;
    lane_in.data  = cic_word_t'({1'b0, hpass ? src_data : buf_rdata});
  end

  // Output pixels of the vertical pass.
  assign out_valid = !hpass && busy && sc_keep;
  assign out_x     = obx + 11'(col);
  assign out_y     = oby + 11'(sc_keep_idx);
  assign out_pix   = pp_pix;
  assign frame_done = (state == E_DONE);
  assign keep_v_now = (sc_keep && !hpass) ? sc_keep_idx + 6'd1 : keep_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= E_IDLE;
      bx0    <= '0;
      by0    <= '0;
      obx    <= '0;
      oby    <= '0;
      row    <= '0;
      col    <= '0;
      keep_h <= '0;
      keep_v <= '0;
    end else begin
      if (sc_keep && hpass)  keep_h <= sc_keep_idx + 6'd1;
      if (sc_keep && !hpass) keep_v <= sc_keep_idx + 6'd1;
      unique case (state)
        E_IDLE: if (frame_start) begin
          state <= E_HSTART;
          bx0 <= '0; by0 <= '0; obx <= '0; oby <= '0; row <= '0;
        end
        E_HSTART: state <= E_HWAIT;
        E_HWAIT: if (sc_done) begin
          if (row == 4'(SEC_N - 1)) begin
            row   <= '0;
            col   <= '0;
            state <= E_VSTART;
          end else begin
            row   <= row + 4'd1;
            state <= E_HSTART;
          end
        end
        E_VSTART: state <= E_VWAIT;
        E_VWAIT: if (sc_done) begin
          if (col + 6'd1 < keep_h) begin
            col   <= col + 6'd1;
            state <= E_VSTART;
          end else begin
            state <= E_HSTART;
            if (11'(bx0) + 11'(step_h) + 11'(cfg_h.overlap) < 11'(src_w)) begin
              bx0 <= bx0 + 10'(step_h);
              obx <= obx + 11'(keep_h);
            end else begin
              bx0 <= '0;
              obx <= '0;
              if (11'(by0) + 11'(step_v) + 11'(cfg_v.overlap) < 11'(src_h)) begin
                by0 <= by0 + 10'(step_v);
                oby <= oby + 11'(keep_v_now);
              end else begin
                state <= E_DONE;
              end
            end
          end
        end
        default: state <= E_IDLE;  // E_DONE
      endcase
    end
  end

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    sc_start |-> !sc_busy);

endmodule
