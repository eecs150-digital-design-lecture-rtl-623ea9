// fb_addr_xlate: translates a frame-buffer pixel address (Y, X) into an
// SRAM word address, byte write enables and write data.
//
// The SRAM holds the screen in pixel-number order, PN = X + 800*Y, two
// 16-bit pixels per 32-bit word. The multiply by 800 is done without a
// multiplier: 800 = 512 + 256 + 32, so 800*Y = (Y<<9) + (Y<<8) + (Y<<5).
// The word address is PN/2. An even pixel goes to the low half-word
// (byte enables 0011), an odd pixel to the high half-word (1100); the
// colour is placed in both halves and the byte enables pick one, so a
// single pixel is written without a read-modify-write.
//
// Interface: wr (Y, X, colour) in; sram_addr (19 bits; PN/2 needs 18),
// sram_be (active high) and sram_wdata out. Purely combinational.
// The formula, the shift-and-add form and the use of byte write enables
// follow the document; which half holds the even pixel is this design's
// own choice.
module fb_addr_xlate
  import mips150_io_pkg::*;
(
  input  fb_write_t            wr,
  output logic [SRAM_AW-1:0]   sram_addr,
  output logic [SRAM_BW-1:0]   sram_be,
  output logic [SRAM_DW-1:0]   sram_wdata,
  output logic [SRAM_AW:0]     pixel_number
);

  logic [SRAM_AW:0] y_ext, x_ext, pn;

  always_comb begin
    y_ext      = (SRAM_AW+1)'(wr.y);
    x_ext      = (SRAM_AW+1)'(wr.x);
    pn         = x_ext + (y_ext << 9) + (y_ext << 8) + (y_ext << 5);
    sram_addr  = pn[SRAM_AW:1];
    sram_be    = pn[0] ? 4'b1100 : 4'b0011;
    sram_wdata = {wr.color, wr.color};
    pixel_number = pn;
  end

endmodule
