// tb_sram_scheduler: checks the four-slot SRAM schedule.
// A queue stands in for the store buffer and a model SRAM for the chip.
// Phase 1: the video side asks for a read in every slot it can get, so
// reads must take exactly slot 0 of every four and writes the other three.
// Phase 2: the video side asks for nothing (retrace), so writes must take
// all four slots. Phase 3: random requests. Every read must return the
// SRAM word at its address, RD_LAT+1 cycles after the grant; at the end
// the SRAM must hold every written pixel at PN = X + 800*Y.
module tb_sram_scheduler;
  import mips150_io_pkg::*;
  localparam int RD_LAT = 2;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic                vid_rd_req = 0, vid_rd_grant, vid_rd_valid;
  logic [SRAM_AW-1:0]  vid_rd_addr = 0;
  logic [SRAM_DW-1:0]  vid_rd_data;
  logic                wq_empty, wq_rd_en;
  fb_write_t           wq_data;
  logic [SRAM_AW-1:0]  sram_addr;
  logic                sram_we_n, sram_oe_n, sram_dq_oe;
  logic [SRAM_BW-1:0]  sram_bwe_n;
  logic [SRAM_DW-1:0]  sram_dq_o, sram_dq_i;
  logic [1:0]          slot;

  sram_scheduler #(.RD_LAT(RD_LAT)) dut (.*);
  sram_model #(.AW(SRAM_AW), .RD_LAT(RD_LAT)) u_sram (
    .clk(clk), .addr(sram_addr), .we_n(sram_we_n), .oe_n(sram_oe_n), .bwe_n(sram_bwe_n),
    .dq_in(sram_dq_o), .dq_in_en(sram_dq_oe), .dq_out(sram_dq_i));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // store buffer stand-in
  fb_write_t wq[$];
  assign wq_empty = (wq.size() == 0);
  assign wq_data  = wq_empty ? '0 : wq[0];

  // expected frame: pixel number -> colour
  logic [15:0] image [int];
  int exp_rd_addr[$], exp_rd_time[$];
  int cyc = 0;
  int rd_in_slot0 = 0, wr_in_slot0 = 0, wr_other = 0, rd_other = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (vid_rd_grant) begin
        if (slot == 0) rd_in_slot0++; else rd_other++;
        exp_rd_addr.push_back(vid_rd_addr); exp_rd_time.push_back(cyc);
      end
      if (wq_rd_en) begin
        if (slot == 0) wr_in_slot0++; else wr_other++;
        void'(wq.pop_front());
      end
      if (vid_rd_valid) begin
        int a, t, pn0;
        a = exp_rd_addr.pop_front(); t = exp_rd_time.pop_front();
        pn0 = 2 * a;
        check(cyc - t == RD_LAT + 2, $sformatf("read latency %0d", cyc - t));
        check(vid_rd_data[15:0]  == (image.exists(pn0)   ? image[pn0]   : 16'h0) &&
              vid_rd_data[31:16] == (image.exists(pn0+1) ? image[pn0+1] : 16'h0),
              $sformatf("read data at word %0d: %h", a, vid_rd_data));
      end
    end
  end

  // Reads see writes only once they have reached the SRAM, so the test
  // reads words that the writes in flight do not touch: writes go to
  // rows 0..299, reads to rows 300..599 which are filled in phase 0.
  task automatic push_px(input int x, input int y, input int c);
    fb_write_t p;
    p.x = 10'(x); p.y = 10'(y); p.color = 16'(c);
    wq.push_back(p);
    image[x + 800 * y] = 16'(c);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p1_w, p1_r, c0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // phase 0: fill the read area
    for (int i = 0; i < 400; i++) push_px($urandom_range(799), 300 + $urandom_range(299), $urandom);
    wait (wq.size() == 0);
    repeat (8) @(posedge clk);
    // phase 1: reads wanted all the time
    for (int i = 0; i < 600; i++) push_px($urandom_range(799), $urandom_range(299), $urandom);
    @(negedge clk); vid_rd_req = 1;
    rd_in_slot0 = 0; wr_in_slot0 = 0; wr_other = 0; rd_other = 0; c0 = cyc;
    repeat (400) begin
      vid_rd_addr = 19'(150 * 800 + $urandom_range(150 * 800 - 1));
      @(negedge clk);
    end
    check(rd_in_slot0 == 100 && rd_other == 0, $sformatf("reads: %0d in slot 0, %0d elsewhere", rd_in_slot0, rd_other));
    check(wr_in_slot0 == 0 && wr_other == 300, $sformatf("writes with reads: %0d/%0d", wr_in_slot0, wr_other));
    // phase 2: retrace, writes in all four slots
    vid_rd_req = 0; wr_in_slot0 = 0; wr_other = 0;
    repeat (200) @(negedge clk);
    check(wr_in_slot0 == 50 && wr_other == 150, $sformatf("writes in retrace: %0d/%0d", wr_in_slot0, wr_other));
    // phase 3: random
    for (int i = 0; i < 2000; i++) begin
      if ($urandom_range(3) == 0) push_px($urandom_range(799), $urandom_range(299), $urandom);
      vid_rd_req = $urandom_range(1);
      vid_rd_addr = 19'(150 * 800 + $urandom_range(150 * 800 - 1));
      @(negedge clk);
    end
    vid_rd_req = 0;
    wait (wq.size() == 0);
    repeat (10) @(negedge clk);
    // final image check, straight from the model SRAM
    foreach (image[pn]) begin
      logic [31:0] w;
      w = u_sram.mem[pn / 2];
      check((pn % 2 ? w[31:16] : w[15:0]) == image[pn], $sformatf("pixel %0d in SRAM", pn));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
