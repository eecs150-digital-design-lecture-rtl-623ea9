// sram_scheduler: shares the single external frame-buffer SRAM between
// the video interface (reads) and the store buffer (writes).
//
// The SRAM clock is divided into a repeating frame of four slots. Slot 1
// belongs to the video interface: if it asks for a word, the slot is a
// read; slots 2, 3 and 4 are writes from the store buffer. When the video
// interface asks for nothing (during retrace, once its prefetch buffer is
// full) slot 1 is given to writes too, so the store buffer then drains at
// 4 writes per 4 cycles instead of 3. An idle slot does nothing.
// An address multiplexer picks the read address or the translated write
// address (fb_addr_xlate); the data pins are split into an output, an
// output enable (the FPGA drives them only in write cycles) and an input,
// for the pad's tri-state buffer.
//
// Timing: all SRAM pins are registered. The read data of a read issued
// at edge t is expected on sram_dq_i RD_LAT edges later and is handed to
// the video interface (vid_rd_valid/vid_rd_data) one edge after that.
// vid_rd_grant is high in the cycle a read is issued; wq_rd_en pops the
// store buffer in the cycle a write is issued. The slot pattern and the
// address mux follow the document; RD_LAT, the control pin polarities and
// the split data pins are this design's own.
module sram_scheduler
  import mips150_io_pkg::*;
#(
  parameter int unsigned RD_LAT = 2
) (
  input  logic                clk,
  input  logic                rst,
  // video interface read port
  input  logic                vid_rd_req,
  input  logic [SRAM_AW-1:0]  vid_rd_addr,
  output logic                vid_rd_grant,
  output logic                vid_rd_valid,
  output logic [SRAM_DW-1:0]  vid_rd_data,
  // store buffer read side
  input  logic                wq_empty,
  input  fb_write_t           wq_data,
  output logic                wq_rd_en,
  // SRAM pins
  output logic [SRAM_AW-1:0]  sram_addr,
  output logic                sram_we_n,
  output logic                sram_oe_n,
  output logic [SRAM_BW-1:0]  sram_bwe_n,
  output logic [SRAM_DW-1:0]  sram_dq_o,
  output logic                sram_dq_oe,
  input  logic [SRAM_DW-1:0]  sram_dq_i,
  // slot number 0..3 (slot 0 is the read slot), for observation
  output logic [1:0]          slot
);

  logic                issue_rd, issue_wr;
  logic [SRAM_AW-1:0]  wr_addr;
  logic [SRAM_BW-1:0]  wr_be;
  logic [SRAM_DW-1:0]  wr_data;
  logic [SRAM_AW:0]    wr_pn;
  logic [RD_LAT:0]     rd_pipe;

  fb_addr_xlate u_xlate (
    .wr           (wq_data),
    .sram_addr    (wr_addr),
    .sram_be      (wr_be),
    .sram_wdata   (wr_data),
    .pixel_number (wr_pn)
  );

  always_comb begin
    issue_rd     = (slot == 2'd0) && vid_rd_req;
    issue_wr     = !issue_rd && !wq_empty;
    vid_rd_grant = issue_rd;
    wq_rd_en     = issue_wr;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      slot        <= 2'd0;
      sram_addr   <= '0;
      sram_we_n   <= 1'b1;
      sram_oe_n   <= 1'b1;
      sram_bwe_n  <= '1;
      sram_dq_o   <= '0;
      sram_dq_oe  <= 1'b0;
      rd_pipe     <= '0;
      vid_rd_valid <= 1'b0;
      vid_rd_data  <= '0;
    end else begin
      slot       <= slot + 2'd1;
      sram_addr  <= issue_rd ? vid_rd_addr : wr_addr;   // address mux
      sram_we_n  <= !issue_wr;
      sram_oe_n  <= !issue_rd;
      sram_bwe_n <= issue_wr ? ~wr_be : '1;
      sram_dq_o  <= wr_data;
      sram_dq_oe <= issue_wr;
      rd_pipe    <= {rd_pipe[RD_LAT-1:0], issue_rd};
      vid_rd_valid <= rd_pipe[RD_LAT];
      if (rd_pipe[RD_LAT]) vid_rd_data <= sram_dq_i;
    end
  end

  a_one_op: assert property (@(posedge clk) disable iff (rst) !(issue_rd && issue_wr));
  a_rd_slot: assert property (@(posedge clk) disable iff (rst) issue_rd |-> slot == 2'd0);

endmodule
