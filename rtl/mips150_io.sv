// mips150_io: the I/O subsystem of a small MIPS-based FPGA computer:
// a memory-mapped frame buffer in external SRAM with its video scan-out,
// a Bresenham line-drawing engine, and the CPU side of an Ethernet MAC
// interface.
//
// CPU bus (cpu_clk domain). One access per cycle: cpu_we with cpu_addr/
// cpu_wdata writes, cpu_re reads, and read data appears on cpu_rdata on
// the following cycle. cpu_stall is raised, combinationally, while a
// frame-buffer store cannot be taken because the store buffer is full;
// the CPU must hold the store until cpu_stall falls. Address map:
//   0x8000_0000 - 0x803F_FFFF  frame buffer, write only: pixel (X, Y) is
//                              the word at 0x8000_0000 + (Y<<12) + (X<<2),
//                              colour in [15:0]; X >= 800 or Y >= 600 ignored
//   0x8040_0040 - 0x8040_0064  line engine registers (see line_engine)
//   0x8050_0000 - 0x8050_0FFF  Ethernet receive buffer (see eth_rx_buffer)
//   0x8050_1000 - 0x8050_1FFF  Ethernet transmit buffer (see eth_tx_buffer)
//
// Data flow of a pixel: CPU store or line engine pixel -> fb_write_port
// (CPU first, line engine stalls) -> store_buffer (crosses from cpu_clk
// to sram_clk) -> sram_scheduler, which translates (Y, X) to the packed
// SRAM address and writes it in one of the three write slots of every
// four SRAM cycles, or in all four while the video interface is not
// reading. The video interface reads the frame in pixel-number order in
// the remaining slot and drives the display outputs.
//
// The Ethernet buffers connect to the client side of a MAC (a hard block
// in the FPGA), whose PHY and magnetics are on the board; they run on
// cpu_clk. The SRAM data pins are split into output, output enable and
// input for the pad's tri-state buffer. The frame-buffer and line-engine
// addresses, the SRAM slot pattern and the CPU-priority write port follow
// the document; the Ethernet addresses and the bus timing are this
// design's own.
module mips150_io
  import mips150_io_pkg::*;
#(
  parameter int unsigned SB_DEPTH  = 16,                  // store buffer entries
  parameter int unsigned RD_LAT    = 2,                   // SRAM read latency
  parameter int unsigned RX_NBUF   = 2,                   // receive packet slots
  parameter logic [47:0] MAC_ADDR  = 48'h00_0A_35_00_01_50
) (
  input  logic               cpu_clk,
  input  logic               cpu_rst,
  input  logic               sram_clk,
  input  logic               sram_rst,
  // CPU memory-mapped I/O bus
  input  logic [31:0]        cpu_addr,
  input  logic               cpu_re,
  input  logic               cpu_we,
  input  logic [31:0]        cpu_wdata,
  output logic [31:0]        cpu_rdata,
  output logic               cpu_stall,
  // SRAM
  output logic [SRAM_AW-1:0] sram_addr,
  output logic               sram_we_n,
  output logic               sram_oe_n,
  output logic [SRAM_BW-1:0] sram_bwe_n,
  output logic [SRAM_DW-1:0] sram_dq_o,
  output logic               sram_dq_oe,
  input  logic [SRAM_DW-1:0] sram_dq_i,
  // display (sram_clk domain)
  output logic               vid_pix_en,
  output logic               vid_de,
  output logic               vid_hsync,
  output logic               vid_vsync,
  output pixel_t             vid_pixel,
  output logic [15:0]        vid_underrun,
  // Ethernet MAC client (cpu_clk domain)
  input  logic [7:0]         eth_rx_data,
  input  logic               eth_rx_valid,
  input  logic               eth_rx_last,
  input  logic               eth_rx_bad,
  output logic [7:0]         eth_tx_data,
  output logic               eth_tx_valid,
  output logic               eth_tx_last,
  input  logic               eth_tx_ready
);

  // ---------------- address decode ----------------
  logic fb_sel, le_sel, rx_sel, tx_sel;
  always_comb begin
    fb_sel = cpu_addr[31:22] == FB_BASE[31:22];
    le_sel = cpu_addr[31:8]  == LE_BASE[31:8];
    rx_sel = cpu_addr[31:12] == ETH_RX_BASE[31:12];
    tx_sel = cpu_addr[31:12] == ETH_TX_BASE[31:12];
  end

  // ---------------- frame buffer write path ----------------
  fb_write_t cpu_px, le_px, sb_wdata, sb_rdata;
  logic      le_valid, le_ready, le_idle, sb_we, sb_full, sb_empty, sb_re;

  always_comb begin
    cpu_px.y     = cpu_addr[21:12];
    cpu_px.x     = cpu_addr[11:2];
    cpu_px.color = cpu_wdata[PIXEL_W-1:0];
  end

  line_engine u_line (
    .clk       (cpu_clk),
    .rst       (cpu_rst),
    .reg_we    (cpu_we && le_sel),
    .reg_addr  (cpu_addr[7:0]),
    .reg_wdata (cpu_wdata),
    .ready     (le_idle),
    .pix_valid (le_valid),
    .pix       (le_px),
    .pix_ready (le_ready)
  );

  fb_write_port u_wport (
    .cpu_we     (cpu_we && fb_sel),
    .cpu_wr     (cpu_px),
    .cpu_stall  (cpu_stall),
    .le_valid   (le_valid),
    .le_pix     (le_px),
    .le_ready   (le_ready),
    .fifo_we    (sb_we),
    .fifo_wdata (sb_wdata),
    .fifo_full  (sb_full)
  );

  store_buffer #(.WIDTH($bits(fb_write_t)), .DEPTH(SB_DEPTH)) u_sb (
    .wclk  (cpu_clk),
    .wrst  (cpu_rst),
    .wr_en (sb_we),
    .wdata (sb_wdata),
    .full  (sb_full),
    .rclk  (sram_clk),
    .rrst  (sram_rst),
    .rd_en (sb_re),
    .rdata (sb_rdata),
    .empty (sb_empty)
  );

  // ---------------- SRAM and video ----------------
  logic               vrd_req, vrd_grant, vrd_valid;
  logic [SRAM_AW-1:0] vrd_addr;
  logic [SRAM_DW-1:0] vrd_data;
  logic [1:0]         slot;

  sram_scheduler #(.RD_LAT(RD_LAT)) u_sched (
    .clk          (sram_clk),
    .rst          (sram_rst),
    .vid_rd_req   (vrd_req),
    .vid_rd_addr  (vrd_addr),
    .vid_rd_grant (vrd_grant),
    .vid_rd_valid (vrd_valid),
    .vid_rd_data  (vrd_data),
    .wq_empty     (sb_empty),
    .wq_data      (sb_rdata),
    .wq_rd_en     (sb_re),
    .sram_addr    (sram_addr),
    .sram_we_n    (sram_we_n),
    .sram_oe_n    (sram_oe_n),
    .sram_bwe_n   (sram_bwe_n),
    .sram_dq_o    (sram_dq_o),
    .sram_dq_oe   (sram_dq_oe),
    .sram_dq_i    (sram_dq_i),
    .slot         (slot)
  );

  video_interface u_video (
    .clk        (sram_clk),
    .rst        (sram_rst),
    .rd_req     (vrd_req),
    .rd_addr    (vrd_addr),
    .rd_grant   (vrd_grant),
    .rd_valid   (vrd_valid),
    .rd_data    (vrd_data),
    .vid_pix_en (vid_pix_en),
    .vid_de     (vid_de),
    .vid_hsync  (vid_hsync),
    .vid_vsync  (vid_vsync),
    .vid_pixel  (vid_pixel),
    .underrun   (vid_underrun)
  );

  // ---------------- Ethernet ----------------
  logic [31:0] rx_rdata, tx_rdata;

  eth_rx_buffer #(.NBUF(RX_NBUF)) u_rx (
    .clk       (cpu_clk),
    .rst       (cpu_rst),
    .my_mac    (MAC_ADDR),
    .rx_data   (eth_rx_data),
    .rx_valid  (eth_rx_valid),
    .rx_last   (eth_rx_last),
    .rx_bad    (eth_rx_bad),
    .reg_re    (cpu_re && rx_sel),
    .reg_we    (cpu_we && rx_sel),
    .reg_addr  (cpu_addr[11:0]),
    .reg_rdata (rx_rdata)
  );

  eth_tx_buffer u_tx (
    .clk       (cpu_clk),
    .rst       (cpu_rst),
    .my_mac    (MAC_ADDR),
    .reg_re    (cpu_re && tx_sel),
    .reg_we    (cpu_we && tx_sel),
    .reg_addr  (cpu_addr[11:0]),
    .reg_wdata (cpu_wdata),
    .reg_rdata (tx_rdata),
    .tx_data   (eth_tx_data),
    .tx_valid  (eth_tx_valid),
    .tx_last   (eth_tx_last),
    .tx_ready  (eth_tx_ready)
  );

  // ---------------- CPU read data ----------------
  typedef enum logic [1:0] {RD_LE, RD_RX, RD_TX, RD_NONE} rd_src_t;
  rd_src_t     rd_src;
  logic [31:0] le_rdata;

  always_ff @(posedge cpu_clk) begin
    if (cpu_rst) begin
      rd_src   <= RD_NONE;
      le_rdata <= '0;
    end else if (cpu_re) begin
      rd_src   <= le_sel ? RD_LE : rx_sel ? RD_RX : tx_sel ? RD_TX : RD_NONE;
      le_rdata <= (cpu_addr[7:0] == LE_READY) ? {31'd0, le_idle} : 32'd0;
    end
  end

  always_comb begin
    unique case (rd_src)
      RD_LE:   cpu_rdata = le_rdata;
      RD_RX:   cpu_rdata = rx_rdata;
      RD_TX:   cpu_rdata = tx_rdata;
      default: cpu_rdata = '0;
    endcase
  end

endmodule
