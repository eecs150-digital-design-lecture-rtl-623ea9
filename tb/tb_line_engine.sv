// tb_line_engine: self-checking test of the Bresenham line engine.
//
// Draws the worked example (1,1)->(11,5) and checks its pixels against the
// hand-computed list, then draws lines in all octants, including single
// points, horizontal, vertical and 45-degree lines, against a software
// model of the any-octant Bresenham algorithm. Random back-pressure on
// pix_ready checks that a held pixel is not lost; with pix_ready held
// high it checks the rate: one set-up cycle, then one pixel per cycle.
// Last, a trigger written while a line is drawn must not restart it, but
// its coordinate must be used by the next line.
module tb_line_engine;
  import mips150_io_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        reg_we = 0;
  logic [7:0]  reg_addr = 0;
  logic [31:0] reg_wdata = 0;
  logic        ready, pix_valid, pix_ready;
  fb_write_t   pix;

  line_engine dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Reference: any-octant Bresenham, independent of the RTL
  int ref_x[$], ref_y[$];
  task automatic ref_line(input int x0, input int y0, input int x1, input int y1);
    int steep, t, dx, dy, err, ystep, y;
    ref_x.delete(); ref_y.delete();
    steep = ((y1 > y0 ? y1 - y0 : y0 - y1) > (x1 > x0 ? x1 - x0 : x0 - x1));
    if (steep) begin t = x0; x0 = y0; y0 = t; t = x1; x1 = y1; y1 = t; end
    if (x0 > x1) begin t = x0; x0 = x1; x1 = t; t = y0; y0 = y1; y1 = t; end
    dx = x1 - x0; dy = (y1 > y0) ? y1 - y0 : y0 - y1;
    err = dx / 2; y = y0; ystep = (y0 < y1) ? 1 : -1;
    for (int x = x0; x <= x1; x++) begin
      if (steep) begin ref_x.push_back(y); ref_y.push_back(x); end
      else       begin ref_x.push_back(x); ref_y.push_back(y); end
      err -= dy;
      if (err < 0) begin y += ystep; err += dx; end
    end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  int got_x[$], got_y[$];
  int first_pix_cycle, last_pix_cycle, cycle;
  int stall_pct;
  always @(posedge clk) cycle <= cycle + 1;

  // Draw one line; returns the collected pixels
  task automatic draw(input int x0, input int y0, input int x1, input int y1,
                      input int color, input int stall);
    int trig_cycle;
    stall_pct = stall;
    got_x.delete(); got_y.delete();
    wr(LE_X0, x0); wr(LE_Y0, y0); wr(LE_X1, x1); wr(LE_COLOR, color);
    @(negedge clk); reg_we = 1; reg_addr = LE_Y1_GO; reg_wdata = y1;
    trig_cycle = cycle;
    @(negedge clk); reg_we = 0;
    check(!ready, "ready falls after trigger");
    first_pix_cycle = -1;
    while (!ready) begin
      @(posedge clk);
      if (pix_valid && pix_ready) begin
        if (first_pix_cycle < 0) first_pix_cycle = cycle;
        last_pix_cycle = cycle;
        got_x.push_back(pix.x); got_y.push_back(pix.y);
        check(pix.color == 16'(color), "pixel colour");
      end
      #1;
    end
    if (stall == 0) begin
      check(first_pix_cycle - trig_cycle == 2, $sformatf("latency trigger->first pixel %0d", first_pix_cycle - trig_cycle));
      check(last_pix_cycle - first_pix_cycle + 1 == got_x.size(), "one pixel per cycle");
    end
  endtask

  always @(negedge clk) pix_ready = ($urandom_range(99) >= stall_pct);

  task automatic compare(input int x0, input int y0, input int x1, input int y1);
    ref_line(x0, y0, x1, y1);
    check(got_x.size() == ref_x.size(), $sformatf("pixel count %0d vs %0d for (%0d,%0d)-(%0d,%0d)",
          got_x.size(), ref_x.size(), x0, y0, x1, y1));
    for (int i = 0; i < ref_x.size() && i < got_x.size(); i++)
      check(got_x[i] == ref_x[i] && got_y[i] == ref_y[i],
            $sformatf("pixel %0d: got (%0d,%0d) want (%0d,%0d)", i, got_x[i], got_y[i], ref_x[i], ref_y[i]));
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex_x[11] = '{1,2,3,4,5,6,7,8,9,10,11};
    int ex_y[11] = '{1,1,2,2,3,3,3,4,4,5,5};
    cycle = 0; stall_pct = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    check(ready, "ready after reset");
    // Worked example from the line-drawing description
    draw(1, 1, 11, 5, 16'h00F, 0);
    check(got_x.size() == 11, "example pixel count");
    for (int i = 0; i < 11 && i < got_x.size(); i++)
      check(got_x[i] == ex_x[i] && got_y[i] == ex_y[i],
            $sformatf("example pixel %0d: (%0d,%0d)", i, got_x[i], got_y[i]));
    // Special cases
    draw(5, 5, 5, 5, 1, 0);        compare(5, 5, 5, 5);
    draw(0, 7, 20, 7, 2, 0);       compare(0, 7, 20, 7);
    draw(3, 30, 3, 2, 3, 0);       compare(3, 30, 3, 2);
    draw(10, 10, 0, 0, 4, 0);      compare(10, 10, 0, 0);
    draw(1, 1, 11, 2, 5, 0);       compare(1, 1, 11, 2);
    draw(0, 0, 1023, 1023, 6, 0);  compare(0, 0, 1023, 1023);
    draw(1023, 0, 0, 599, 7, 30);  compare(1023, 0, 0, 599);
    // Random lines in all octants, with and without back-pressure
    for (int n = 0; n < 60; n++) begin
      int a, b, c, d;
      a = $urandom_range(1023); b = $urandom_range(1023);
      c = $urandom_range(1023); d = $urandom_range(1023);
      if (n % 3 == 0) begin c = a + $urandom_range(40) - 20; d = b + $urandom_range(40) - 20;
        if (c < 0) c = 0; if (d < 0) d = 0; if (c > 1023) c = 1023; if (d > 1023) d = 1023; end
      draw(a, b, c, d, n, (n % 2) ? 40 : 0);
      compare(a, b, c, d);
    end
    // A trigger written while busy updates the register, does not restart
    begin
      int n_busy;
      stall_pct = 0;
      wr(LE_X0, 0); wr(LE_Y0, 0); wr(LE_X1, 100); wr(LE_COLOR, 3);
      wr(LE_Y1_GO, 0);
      n_busy = 0;
      repeat (10) begin @(posedge clk); #1; if (pix_valid && pix_ready) n_busy++; end
      @(negedge clk); reg_we = 1; reg_addr = LE_X1_GO; reg_wdata = 5;
      @(negedge clk); reg_we = 0;
      while (!ready) begin @(posedge clk); #1; if (pix_valid && pix_ready) n_busy++; end
      check(n_busy >= 95 && n_busy <= 101, $sformatf("busy trigger restarted the line (%0d pixels)", n_busy));
      // the X1 written while busy is kept for the next line: (0,0)-(5,2)
      @(negedge clk); reg_we = 1; reg_addr = LE_Y1_GO; reg_wdata = 2;
      @(negedge clk); reg_we = 0;
      got_x.delete();
      while (!ready) begin @(posedge clk); #1; if (pix_valid && pix_ready) got_x.push_back(pix.x); end
      check(got_x.size() == 6, $sformatf("re-trigger with kept X1: %0d pixels", got_x.size()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
