// tb_fb_addr_xlate: checks the (Y, X) -> SRAM address translation against
// PN = X + 800*Y computed with a multiply, for the screen corners and
// random pixels: word address PN/2, byte enables 0011 for even and 1100
// for odd pixels, colour in both half-words.
module tb_fb_addr_xlate;
  import mips150_io_pkg::*;

  fb_write_t            wr;
  logic [SRAM_AW-1:0]   sram_addr;
  logic [SRAM_BW-1:0]   sram_be;
  logic [SRAM_DW-1:0]   sram_wdata;
  logic [SRAM_AW:0]     pixel_number;

  fb_addr_xlate dut (.*);

  int checks = 0, failures = 0;

  task automatic try(input int x, input int y, input int c);
    int pn;
    wr.x = 10'(x); wr.y = 10'(y); wr.color = 16'(c);
    #1;
    pn = x + 800 * y;
    checks++;
    if (pixel_number != 20'(pn) || sram_addr != 19'(pn / 2) ||
        sram_be != ((pn % 2) ? 4'b1100 : 4'b0011) || sram_wdata != {16'(c), 16'(c)}) begin
      failures++;
      $display("FAIL x=%0d y=%0d: addr %0d be %b", x, y, sram_addr, sram_be);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(0, 0, 1); try(1, 0, 2); try(799, 0, 3); try(0, 1, 4);
    try(799, 599, 5); try(11, 5, 6); try(1023, 1023, 7);
    for (int i = 0; i < 2000; i++)
      try($urandom_range(799), $urandom_range(599), $urandom_range(65535));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
