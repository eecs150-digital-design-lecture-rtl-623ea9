// video_interface: scans the frame buffer out to the display.
//
// The frame buffer is read from SRAM in pixel-number order, word 0 up to
// the last word of the frame, two 16-bit pixels per word (low half first).
// Words are fetched ahead into a small prefetch FIFO: a read is requested
// whenever the FIFO, counting reads still in flight, has room. The SRAM
// scheduler grants at most one read in every four SRAM cycles, which is
// exactly the rate at which an active line consumes words (one pixel every
// two SRAM cycles), so the FIFO fills during blanking and stays level
// during the active part of a line. Once it is full the interface stops
// asking, and the scheduler gives its slot to writes.
//
// The raster generator runs on a pixel enable of half the SRAM clock
// (99 MHz / 2 = 49.5 MHz). Its default timing is the common 800 x 600 at
// 75 Hz mode: 1056 x 625 total, sync pulses of 80 pixels and 3 lines,
// both active high. After reset the raster starts in vertical blanking so
// that the FIFO is full before the first visible pixel.
//
// Outputs (all registered): vid_pix_en marks a pixel clock cycle;
// vid_de, vid_hsync, vid_vsync and vid_pixel describe that pixel.
// underrun counts visible pixels for which no word was ready (shown as 0).
// The reading order, two pixels per read and the pixel rate follow the
// document; the raster timing, the prefetch FIFO and its depth are this
// design's own.
module video_interface
  import mips150_io_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 800,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 80,
  parameter int unsigned H_BP     = 160,
  parameter int unsigned V_ACTIVE = 600,
  parameter int unsigned V_FP     = 1,
  parameter int unsigned V_SYNC   = 3,
  parameter int unsigned V_BP     = 21,
  parameter int unsigned PF_DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst,
  // SRAM read port (to sram_scheduler)
  output logic               rd_req,
  output logic [SRAM_AW-1:0] rd_addr,
  input  logic               rd_grant,
  input  logic               rd_valid,
  input  logic [SRAM_DW-1:0] rd_data,
  // display
  output logic               vid_pix_en,
  output logic               vid_de,
  output logic               vid_hsync,
  output logic               vid_vsync,
  output pixel_t             vid_pixel,
  output logic [15:0]        underrun
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned WORDS   = H_ACTIVE * V_ACTIVE / 2;
  localparam int unsigned PW      = $clog2(PF_DEPTH);
  localparam int unsigned HW      = $clog2(H_TOTAL);
  localparam int unsigned VW      = $clog2(V_TOTAL);

  // ---------------- prefetch ----------------
  logic [SRAM_DW-1:0] pf_mem [PF_DEPTH];
  logic [PW-1:0]      pf_wp, pf_rp;
  logic [PW:0]        pf_cnt, inflight;
  logic               pf_pop;

  assign rd_req = (32'(pf_cnt) + 32'(inflight)) < PF_DEPTH;

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_addr  <= '0;
      inflight <= '0;
      pf_wp    <= '0;
      pf_rp    <= '0;
      pf_cnt   <= '0;
    end else begin
      if (rd_grant)
        rd_addr <= (32'(rd_addr) == WORDS - 1) ? '0 : rd_addr + 1'b1;
      inflight <= inflight + (PW+1)'(rd_grant) - (PW+1)'(rd_valid);
      if (rd_valid) pf_wp <= pf_wp + 1'b1;
      if (pf_pop)   pf_rp <= pf_rp + 1'b1;
      pf_cnt <= pf_cnt + (PW+1)'(rd_valid) - (PW+1)'(pf_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (rd_valid) pf_mem[pf_wp] <= rd_data;
  end

  // ---------------- raster ----------------
  logic          pix_en;
  logic [HW-1:0] h_cnt;
  logic [VW-1:0] v_cnt;
  logic          half;       // 0: low pixel of the word, 1: high pixel
  logic          active, have_word;

  always_comb begin
    active    = (32'(h_cnt) < H_ACTIVE) && (32'(v_cnt) < V_ACTIVE);
    have_word = (pf_cnt != 0);
    pf_pop    = pix_en && active && half && have_word;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pix_en   <= 1'b0;
      h_cnt    <= '0;
      v_cnt    <= VW'(V_ACTIVE);
      half     <= 1'b0;
      underrun <= '0;
      vid_pix_en <= 1'b0;
      vid_de     <= 1'b0;
      vid_hsync  <= 1'b0;
      vid_vsync  <= 1'b0;
      vid_pixel  <= '0;
    end else begin
      pix_en     <= !pix_en;
      vid_pix_en <= pix_en;
      if (pix_en) begin
        if (32'(h_cnt) == H_TOTAL - 1) begin
          h_cnt <= '0;
          v_cnt <= (32'(v_cnt) == V_TOTAL - 1) ? '0 : v_cnt + 1'b1;
        end else begin
          h_cnt <= h_cnt + 1'b1;
        end
        vid_de    <= active;
        vid_hsync <= (32'(h_cnt) >= H_ACTIVE + H_FP) && (32'(h_cnt) < H_ACTIVE + H_FP + H_SYNC);
        vid_vsync <= (32'(v_cnt) >= V_ACTIVE + V_FP) && (32'(v_cnt) < V_ACTIVE + V_FP + V_SYNC);
        if (active) begin
          half <= !half;
          if (have_word) begin
            vid_pixel <= half ? pf_mem[pf_rp][31:16] : pf_mem[pf_rp][15:0];
          end else begin
            vid_pixel <= '0;
            if (underrun != '1) underrun <= underrun + 1'b1;
          end
        end else begin
          vid_pixel <= '0;
        end
      end
    end
  end

  a_no_pf_overflow: assert property (@(posedge clk) disable iff (rst)
                                     32'(pf_cnt) + 32'(inflight) <= PF_DEPTH);

endmodule
