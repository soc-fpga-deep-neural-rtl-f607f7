// conv_controller: the control unit that schedules a whole convolution layer.
//
// Sequence of one run (started by `start`, configuration latched then):
//   1. weight load: 9*N_CH*N_CH/16 beats into the weight memory (2 clocks/beat);
//   2. bias load:   N_CH/8 beats into the bias memory (1 clock/beat);
//   3. initial activation load: 2*(a_x+2)+3 padded positions, N_CH/8 words each,
//      one word per clock; padding positions are shifted in as zero words
//      without reading the stream;
//   4. for every output row y, column x and group of N_PE output channels:
//      for each kernel position (ky,kx) whose input pixel is not padding, and
//      each of the N_CH/8 channel words, issue one read of the activation,
//      weight and bias memories (one MAC step per clock in every MAC). Kernel
//      positions on padding are skipped entirely, since they add nothing;
//   5. after the last channel group of a pixel, load the next position (one
//      word per clock), or three positions when the window moves to the next
//      row; the final pixel needs no load.
// The PE results of a group are handed to the output multiplexer; the last MAC
// step of a group is held back while the multiplexer still holds the previous
// group (output back-pressure) - the only stall inside the MAC loop.
//
// Timing: memory reads are registered, so pe_en/pe_first/pe_last lag the read
// request by one clock, aligned with the data. Cycle budget per pixel, with no
// back-pressure: (N_CH/N_PE) * 9_valid * (N_CH/8) MAC clocks, plus N_CH/8 or
// 3*N_CH/8 load clocks. The loop order, the padding skip and the load pattern
// follow the accelerator description; the hand-over rules are this design's.
module conv_controller
  import conv_pkg::*;
#(
  parameter int unsigned N_CH = 256,
  parameter int unsigned N_PE = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  layer_cfg_t                    cfg_in,
  output layer_cfg_t                    cfg,
  output logic                          busy,
  output logic                          done,
  // input stream
  input  logic [BUS_W-1:0]              s_tdata,
  input  logic                          s_tvalid,
  output logic                          s_tready,
  // memory loading
  output logic                          ld_init,
  output logic                          wm_ld_valid,
  input  logic                          wm_ld_ready,
  output logic                          bm_wr_en,
  output logic                          am_shift,
  output logic [BUS_W-1:0]              am_din,
  // memory reads (one per MAC step)
  output logic                          rd_en,
  output logic [3:0]                    rd_p,
  output logic [$clog2(N_CH/8)-1:0]     rd_n,
  output logic [$clog2(N_CH/N_PE)-1:0]  rd_g,
  // PE control, aligned with the read data
  output logic                          pe_en,
  output logic                          pe_first,
  output logic                          pe_last,
  input  logic                          pe_res_valid,
  // output multiplexer
  input  logic                          om_idle,
  output logic                          om_load,
  output logic                          om_last_grp
);
  localparam int unsigned NW   = N_CH / 8;                 // words per position
  localparam int unsigned NG   = N_CH / N_PE;              // channel groups
  localparam int unsigned NWB  = KPOS * N_CH * N_CH / 16;  // weight beats
  localparam int unsigned NBB  = N_CH / 8;                 // bias beats

  ctrl_state_t               state;
  logic [$clog2(NWB+1)-1:0]  wl_cnt;
  logic [$clog2(NBB+1)-1:0]  bl_cnt;
  logic [15:0]               ld_left;
  logic [$clog2(NW)-1:0]     ld_word;
  logic [DIM_W:0]            lpx, lpy;     // padded coordinates being loaded
  logic [DIM_W-1:0]          ox, oy;       // output pixel
  logic [$clog2(NG)-1:0]     g;
  logic [3:0]                p;
  logic [$clog2(NW)-1:0]     n;
  logic                      pend, pend_final;

  logic [KPOS-1:0]           mask;         // kernel positions not on padding
  logic [3:0]                p_first, p_last, p_next;
  logic                      pad_pos, is_last, stall, issue, last_pix;

  // ------------------------------------------------------------ decode
  always_comb begin
    for (int k = 0; k < KPOS; k++) begin
      int ix, iy;
      ix = int'(ox) + (k % 3) - 1;
      iy = int'(oy) + (k / 3) - 1;
      mask[k] = (ix >= 0) && (ix < int'(cfg.a_x)) && (iy >= 0) && (iy < int'(cfg.a_y));
    end
    p_first = 4'd0;
    for (int k = KPOS - 1; k >= 0; k--) if (mask[k]) p_first = 4'(k);
    p_last = 4'd0;
    for (int k = 0; k < KPOS; k++) if (mask[k]) p_last = 4'(k);
    p_next = p;
    for (int k = KPOS - 1; k >= 0; k--) if (mask[k] && 4'(k) > p) p_next = 4'(k);

    last_pix = (32'(ox) == 32'(cfg.a_x) - 1) && (32'(oy) == 32'(cfg.a_y) - 1);
    is_last  = (p == p_last) && (32'(n) == NW - 1);
    stall    = is_last && (pend || !om_idle);
    issue    = (state == S_MAC) && !stall;

    pad_pos  = !((lpx >= 1) && (32'(lpx) <= 32'(cfg.a_x)) &&
                 (lpy >= 1) && (32'(lpy) <= 32'(cfg.a_y)));
  end

  // ------------------------------------------------------------ stream side
  always_comb begin
    s_tready    = 1'b0;
    wm_ld_valid = 1'b0;
    bm_wr_en    = 1'b0;
    am_shift    = 1'b0;
    am_din      = '0;
    unique case (state)
      S_WLOAD: begin
        wm_ld_valid = s_tvalid;
        s_tready    = wm_ld_ready;
      end
      S_BLOAD: begin
        s_tready = 1'b1;
        bm_wr_en = s_tvalid;
      end
      S_ALOAD: begin
        s_tready = !pad_pos;
        am_shift = pad_pos || s_tvalid;
        am_din   = pad_pos ? '0 : s_tdata;
      end
      default: ;
    endcase
    busy    = (state != S_IDLE);
    ld_init = (state == S_IDLE) && start;
    rd_en   = issue;
    rd_p    = p;
    rd_n    = n;
    rd_g    = g;
    om_load = pe_res_valid;
    om_last_grp = pend_final;
  end

  // ------------------------------------------------------------ sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cfg <= '0; done <= 1'b0;
      wl_cnt <= '0; bl_cnt <= '0; ld_left <= '0; ld_word <= '0;
      lpx <= '0; lpy <= '0; ox <= '0; oy <= '0; g <= '0; p <= '0; n <= '0;
      pend <= 1'b0; pend_final <= 1'b0;
      pe_en <= 1'b0; pe_first <= 1'b0; pe_last <= 1'b0;
    end else begin
      done     <= 1'b0;
      pe_en    <= issue;
      pe_first <= issue && (p == p_first) && (n == '0);
      pe_last  <= issue && is_last;
      if (pe_res_valid) pend <= 1'b0;

      unique case (state)
        S_IDLE: if (start) begin
          cfg    <= cfg_in;
          wl_cnt <= '0;
          bl_cnt <= '0;
          ox <= '0; oy <= '0; g <= '0; n <= '0;
          pend <= 1'b0;
          state  <= S_WLOAD;
        end
        S_WLOAD: if (s_tvalid && wm_ld_ready) begin
          wl_cnt <= wl_cnt + 1'b1;
          if (32'(wl_cnt) == NWB - 1) state <= S_BLOAD;
        end
        S_BLOAD: if (s_tvalid) begin
          bl_cnt <= bl_cnt + 1'b1;
          if (32'(bl_cnt) == NBB - 1) begin
            state   <= S_ALOAD;
            ld_left <= 16'(2 * (32'(cfg.a_x) + 2) + 3);
            ld_word <= '0;
            lpx <= '0; lpy <= '0;
          end
        end
        S_ALOAD: if (am_shift) begin
          if (32'(ld_word) == NW - 1) begin
            ld_word <= '0;
            if (32'(lpx) == 32'(cfg.a_x) + 1) begin
              lpx <= '0;
              lpy <= lpy + 1'b1;
            end else lpx <= lpx + 1'b1;
            ld_left <= ld_left - 1'b1;
            if (ld_left == 16'd1) begin
              state <= S_MAC;
              p <= p_first;
              n <= '0;
              g <= '0;
            end
          end else ld_word <= ld_word + 1'b1;
        end
        S_MAC: if (issue) begin
          if (32'(n) == NW - 1) begin
            n <= '0;
            if (p == p_last) begin
              // channel group complete
              pend       <= 1'b1;
              pend_final <= last_pix && (32'(g) == NG - 1);
              p          <= p_first;
              if (32'(g) == NG - 1) begin
                g <= '0;
                if (last_pix) state <= S_DRAIN;
                else begin
                  state   <= S_ALOAD;
                  ld_word <= '0;
                  if (32'(ox) == 32'(cfg.a_x) - 1) begin
                    ox <= '0;
                    oy <= oy + 1'b1;
                    ld_left <= 16'd3;
                  end else begin
                    ox <= ox + 1'b1;
                    ld_left <= 16'd1;
                  end
                end
              end else g <= g + 1'b1;
            end else p <= p_next;
          end else n <= n + 1'b1;
        end
        S_DRAIN: if (!pend && om_idle && !pe_res_valid) state <= S_DONE;
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
