// store_buffer: dual-clock FIFO that carries frame-buffer writes from the
// CPU clock domain to the SRAM clock domain.
//
// Every frame-buffer write, from the CPU or the line engine, enters here
// at the CPU clock and is drained at the SRAM clock by the SRAM slot
// scheduler. The FIFO is the usual asynchronous design: binary read and
// write pointers one bit wider than the address, their Gray-coded copies
// passed through two-flop synchronisers into the other domain, full and
// empty computed from the synchronised Gray pointers. The read side is
// first-word-fall-through: rdata shows the oldest entry whenever empty
// is low, and rd_en removes it.
//
// Timing: an entry written at a wclk edge becomes visible to the read
// side two to three rclk edges later; a read frees its slot for the
// writer two to three wclk edges later. full and empty are conservative.
// The document asks for a FIFO that crosses the clock boundary; its depth
// (DEPTH) and the Gray-pointer scheme are this design's own.
module store_buffer #(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned DEPTH = 16      // power of two
) (
  input  logic             wclk,
  input  logic             wrst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_s1, wgray_s2;   // write pointer in read domain
  logic [AW:0] rgray_s1, rgray_s2;   // read pointer in write domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write domain
  logic [AW:0] wbin_nxt;
  assign wbin_nxt = wbin + (AW+1)'(wr_en && !full);

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_s1 <= '0; rgray_s2 <= '0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= bin2gray(wbin_nxt);
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  // Full when the write pointer is one lap ahead of the read pointer:
  // Gray codes differ in the two top bits and agree below.
  assign full = (wgray == {~rgray_s2[AW:AW-1], rgray_s2[AW-2:0]});

  // Read domain
  logic [AW:0] rbin_nxt;
  assign rbin_nxt = rbin + (AW+1)'(rd_en && !empty);

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_s1 <= '0; wgray_s2 <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= bin2gray(rbin_nxt);
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
    end
  end

  assign empty = (rgray == wgray_s2);
  assign rdata = mem[rbin[AW-1:0]];

  // A write into a full FIFO or a read from an empty one is a user error
  a_no_overflow:  assert property (@(posedge wclk) disable iff (wrst) !(wr_en && full))
    else $error("store_buffer: write while full");
  a_no_underflow: assert property (@(posedge rclk) disable iff (rrst) !(rd_en && empty))
    else $error("store_buffer: read while empty");

endmodule
