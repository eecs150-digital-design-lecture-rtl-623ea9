// fb_write_port: the frame buffer's single write port, shared by the CPU
// and the line engine.
//
// The CPU has priority: in a cycle where the CPU stores a pixel, the line
// engine is held (le_ready low) and keeps its pixel for a later cycle.
// When the store buffer behind this port is full, the CPU is stalled
// (cpu_stall) and the line engine waits as well. Writes that fall outside
// the visible 800 x 600 screen (the CPU window is 1024 columns wide) are
// accepted and discarded, since in the packed SRAM layout they would land
// on a pixel of the next row.
//
// Interface: cpu_we/cpu_wr is the CPU's decoded frame-buffer store;
// le_valid/le_pix/le_ready the line engine's pixel handshake; fifo_we/
// fifo_wdata/fifo_full the store buffer's write side. Purely
// combinational. CPU priority and the stalls follow the document; the
// clipping is this design's own.
module fb_write_port
  import mips150_io_pkg::*;
(
  input  logic      cpu_we,
  input  fb_write_t cpu_wr,
  output logic      cpu_stall,
  input  logic      le_valid,
  input  fb_write_t le_pix,
  output logic      le_ready,
  output logic      fifo_we,
  output fb_write_t fifo_wdata,
  input  logic      fifo_full
);

  logic      sel_cpu;
  fb_write_t chosen;
  logic      on_screen;

  always_comb begin
    sel_cpu    = cpu_we;
    chosen     = sel_cpu ? cpu_wr : le_pix;
    on_screen  = (32'(chosen.x) < SCREEN_W) && (32'(chosen.y) < SCREEN_H);
    cpu_stall  = cpu_we && fifo_full;
    le_ready   = !cpu_we && !fifo_full;
    fifo_we    = (cpu_we || le_valid) && !fifo_full && on_screen;
    fifo_wdata = chosen;
  end

endmodule
