// tb_mips150_io: end-to-end test of the I/O subsystem at its full size
// (800 x 600 screen, default parameters), with a model SRAM on the pins.
//
// 1. The CPU clears the screen the way the frame-buffer clear loop does:
//    one store per word over the 1024 x 600 CPU window, so the columns
//    800..1023 are discarded. The bursts fill the store buffer and the CPU
//    is stalled; the number of CPU cycles the clear takes is reported.
// 2. The line engine draws lines in several octants while the CPU keeps
//    storing pixels elsewhere, so the engine is held back by CPU priority.
// 3. A whole displayed frame is compared, pixel by pixel, with an image
//    computed in the testbench (clear colour, CPU pixels, Bresenham lines).
// 4. An Ethernet frame for this node and one for another node are
//    received and read back; a frame is sent and compared.
// Each mechanism (CPU stall, line engine held by the CPU, off-screen
// discard, read slot, four write slots in retrace, filtering) is counted
// and must have happened at least once.
module tb_mips150_io;
  import mips150_io_pkg::*;
  localparam logic [47:0] MY = 48'h00_0A_35_00_01_50;   // the top's default

  logic cpu_clk = 0, sram_clk = 0, cpu_rst = 1, sram_rst = 1;
  always #6.25 cpu_clk  = ~cpu_clk;    // 80 MHz
  always #5.05 sram_clk = ~sram_clk;   // 99 MHz

  logic [31:0]        cpu_addr = 0, cpu_wdata = 0, cpu_rdata;
  logic               cpu_re = 0, cpu_we = 0, cpu_stall;
  logic [SRAM_AW-1:0] sram_addr;
  logic               sram_we_n, sram_oe_n, sram_dq_oe;
  logic [SRAM_BW-1:0] sram_bwe_n;
  logic [SRAM_DW-1:0] sram_dq_o, sram_dq_i;
  logic               vid_pix_en, vid_de, vid_hsync, vid_vsync;
  pixel_t             vid_pixel;
  logic [15:0]        vid_underrun;
  logic [7:0]         eth_rx_data = 0, eth_tx_data;
  logic               eth_rx_valid = 0, eth_rx_last = 0, eth_rx_bad = 0;
  logic               eth_tx_valid, eth_tx_last, eth_tx_ready = 1;

  mips150_io dut (.*);

  sram_model #(.AW(SRAM_AW), .RD_LAT(2)) u_sram (
    .clk(sram_clk), .addr(sram_addr), .we_n(sram_we_n), .oe_n(sram_oe_n),
    .bwe_n(sram_bwe_n), .dq_in(sram_dq_o), .dq_in_en(sram_dq_oe), .dq_out(sram_dq_i));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------- expected image ----------------
  logic [15:0] img [SCREEN_W * SCREEN_H];
  task automatic img_set(input int x, input int y, input logic [15:0] c);
    if (x < 800 && y < 600) img[x + 800 * y] = c;
  endtask

  // ---------------- mechanism counters ----------------
  int n_cpu_stall = 0, n_le_held = 0, n_clipped = 0, n_rd_slot = 0;
  int n_wr_slot0 = 0, n_underrun_seen = 0;
  always @(posedge cpu_clk) if (!cpu_rst) begin
    if (cpu_stall) n_cpu_stall++;
    if (dut.le_valid && dut.u_wport.cpu_we) n_le_held++;
    if ((dut.u_wport.cpu_we || dut.le_valid) && !dut.sb_full && !dut.u_wport.on_screen) n_clipped++;
  end
  always @(posedge sram_clk) if (!sram_rst) begin
    if (dut.u_sched.issue_rd) n_rd_slot++;
    if (dut.u_sched.issue_wr && dut.slot == 2'd0) n_wr_slot0++;
  end

  // ---------------- CPU bus ----------------
  task automatic store(input logic [31:0] a, input logic [31:0] d);
    @(negedge cpu_clk); cpu_we = 1; cpu_addr = a; cpu_wdata = d;
    #1;
    while (cpu_stall) begin @(negedge cpu_clk); #1; end
    @(posedge cpu_clk); #1; cpu_we = 0;
  endtask
  task automatic load(input logic [31:0] a, output logic [31:0] d);
    @(negedge cpu_clk); cpu_re = 1; cpu_addr = a;
    @(negedge cpu_clk); cpu_re = 0; d = cpu_rdata;
  endtask
  function automatic logic [31:0] fb(input int x, input int y);
    return FB_BASE + 32'(y << 12) + 32'(x << 2);
  endfunction

  // ---------------- reference Bresenham ----------------
  task automatic ref_line(input int x0, input int y0, input int x1, input int y1, input logic [15:0] c);
    int steep, t, dx, dy, err, ystep, y;
    steep = ((y1 > y0 ? y1 - y0 : y0 - y1) > (x1 > x0 ? x1 - x0 : x0 - x1));
    if (steep) begin t = x0; x0 = y0; y0 = t; t = x1; x1 = y1; y1 = t; end
    if (x0 > x1) begin t = x0; x0 = x1; x1 = t; t = y0; y0 = y1; y1 = t; end
    dx = x1 - x0; dy = (y1 > y0) ? y1 - y0 : y0 - y1;
    err = dx / 2; y = y0; ystep = (y0 < y1) ? 1 : -1;
    for (int x = x0; x <= x1; x++) begin
      if (steep) img_set(y, x, c); else img_set(x, y, c);
      err -= dy;
      if (err < 0) begin y += ystep; err += dx; end
    end
  endtask

  // ---------------- display checker ----------------
  int pn = 0, frame_no = 0, check_frame = -1, frame_errs = 0;
  always @(posedge sram_clk) if (!sram_rst && vid_pix_en && vid_de) begin
    if (frame_no == check_frame) begin
      checks++;
      if (vid_pixel != img[pn]) begin
        failures++; frame_errs++;
        if (frame_errs < 10) $display("FAIL: displayed pixel %0d is %h want %h", pn, vid_pixel, img[pn]);
      end
    end
    if (pn == SCREEN_W * SCREEN_H - 1) begin pn = 0; frame_no++; end
    else pn++;
  end

  // ---------------- Ethernet helpers ----------------
  task automatic eth_send(input logic [47:0] dst, input int len, output byte unsigned f[$]);
    f.delete();
    for (int i = 0; i < 6; i++) f.push_back(dst[47 - 8*i -: 8]);
    for (int i = 6; i < len; i++) f.push_back(8'($urandom));
    foreach (f[i]) begin
      @(negedge cpu_clk);
      eth_rx_valid = 1; eth_rx_data = f[i]; eth_rx_last = (i == len - 1);
    end
    @(negedge cpu_clk); eth_rx_valid = 0; eth_rx_last = 0;
  endtask

  byte unsigned tx_got[$];
  always @(posedge cpu_clk) if (eth_tx_valid && eth_tx_ready) tx_got.push_back(eth_tx_data);

  initial begin
    #60ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    longint t0, clear_cycles;
    byte unsigned f[$];
    repeat (4) @(posedge sram_clk);
    sram_rst = 0;
    @(negedge cpu_clk); cpu_rst = 0;

    // 1. clear: 1024 x 600 words, colour 0x0005
    t0 = $time;
    for (int y = 0; y < 600; y++)
      for (int x = 0; x < 1024; x++)
        store(fb(x, y), 32'h0005);
    clear_cycles = ($time - t0) / 12.5;
    for (int i = 0; i < SCREEN_W * SCREEN_H; i++) img[i] = 16'h0005;
    $display("count: screen clear took %0d CPU cycles (%0d stores)", clear_cycles, 1024 * 600);

    // 2. lines, with CPU stores to rows 500..599 at the same time
    begin
      int lines[6][4] = '{'{1,1,11,5}, '{100,10,700,390}, '{790,20,30,60},
                          '{400,399,380,0}, '{5,300,5,30}, '{0,0,799,399}};
      for (int l = 0; l < 6; l++) begin
        store(LE_BASE + LE_COLOR, 32'(16'h1000 + l));
        store(LE_BASE + LE_X0, lines[l][0]);
        store(LE_BASE + LE_Y0, lines[l][1]);
        store(LE_BASE + LE_X1, lines[l][2]);
        store(LE_BASE + LE_Y1_GO, lines[l][3]);
        ref_line(lines[l][0], lines[l][1], lines[l][2], lines[l][3], 16'h1000 + 16'(l));
        for (int k = 0; k < 40; k++) begin
          int x, y;
          x = $urandom_range(1023); y = 500 + $urandom_range(99);
          store(fb(x, y), 32'(16'h2000 + k)); img_set(x, y, 16'h2000 + 16'(k));
        end
        do load(LE_BASE + LE_READY, d); while (d[0] == 1'b0);
      end
    end

    // 4. Ethernet (while the frame buffer drains)
    eth_send(MY, 60, f);
    begin
      byte unsigned first[$];
      first = f;
      eth_send(48'h00_11_22_33_44_55, 60, f);
      load(ETH_RX_BASE, d);
      check(d[31] && d[15:0] == 16'd60, $sformatf("rx status %h", d));
      for (int i = 0; i < 60; i += 4) begin
        load(ETH_RX_BASE + 32'h800 + 32'(i), d);
        check(d == {first[i], first[i+1], first[i+2], first[i+3]}, $sformatf("rx word %0d", i / 4));
      end
    end
    store(ETH_RX_BASE, 0);
    load(ETH_RX_BASE, d);   check(!d[31], "no other frame kept");
    load(ETH_RX_BASE + 8, d); check(d == 1, "one frame filtered");
    store(ETH_TX_BASE + 32'h800, 32'hDEADBEEF);
    store(ETH_TX_BASE + 32'h000, 32'h0000_FFFF);
    store(ETH_TX_BASE + 32'h004, 32'hFFFF_FFFF);
    store(ETH_TX_BASE + 32'h008, 32'h0000_0800);
    tx_got.delete();
    store(ETH_TX_BASE + 32'h00C, 4);
    repeat (30) @(posedge cpu_clk);
    check(tx_got.size() == 18, $sformatf("tx frame length %0d", tx_got.size()));
    if (tx_got.size() == 18)
      check(tx_got[0] == 8'hFF && tx_got[6] == MY[47:40] && tx_got[11] == MY[7:0] &&
            tx_got[12] == 8'h08 && tx_got[13] == 8'h00 && tx_got[14] == 8'hDE && tx_got[17] == 8'hEF,
            "tx frame contents");

    // 3. wait until the store buffer is empty, then check the next full frame
    wait (dut.sb_empty);
    repeat (20) @(posedge sram_clk);
    check_frame = frame_no + 1;
    wait (frame_no == check_frame + 1);
    check(frame_errs == 0, $sformatf("%0d wrong pixels in the checked frame", frame_errs));
    check(vid_underrun == 0, $sformatf("video underruns %0d", vid_underrun));

    $display("count: cpu stall cycles %0d, line engine held by CPU %0d, off-screen writes %0d",
             n_cpu_stall, n_le_held, n_clipped);
    $display("count: video reads %0d, writes in the read slot %0d", n_rd_slot, n_wr_slot0);
    check(n_cpu_stall > 0, "CPU stall happened");
    check(n_le_held > 0, "line engine held by CPU priority happened");
    check(n_clipped > 0, "off-screen discard happened");
    check(n_rd_slot > 0, "video reads happened");
    check(n_wr_slot0 > 0, "writes used the read slot during retrace");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
