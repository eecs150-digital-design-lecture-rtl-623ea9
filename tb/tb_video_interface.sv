// tb_video_interface: checks the frame-buffer scan-out on a small raster
// (16 x 6 visible, plus blanking). A stand-in for the SRAM scheduler
// grants a read in one cycle of every four and returns, three cycles
// later, a word whose two pixels are their own pixel numbers. Over three
// frames every visible pixel must show its pixel number in raster order,
// with no underrun; hsync and vsync pulses must have the set widths and
// the set number per frame; and the read requests must stop while the
// prefetch buffer is full (the retrace case).
module tb_video_interface;
  import mips150_io_pkg::*;
  localparam int HA = 16, HF = 2, HS = 3, HB = 4, VA = 6, VF = 1, VS = 2, VB = 2;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic               rd_req, rd_grant, rd_valid;
  logic [SRAM_AW-1:0] rd_addr;
  logic [SRAM_DW-1:0] rd_data;
  logic               vid_pix_en, vid_de, vid_hsync, vid_vsync;
  pixel_t             vid_pixel;
  logic [15:0]        underrun;

  video_interface #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
                    .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB)) dut (.*);

  // read responder: slot 0 of 4, data 3 cycles after the grant
  logic [1:0]  slot = 0;
  logic [2:0]  vpipe = 0;
  logic [31:0] dpipe [3];
  assign rd_grant = rd_req && (slot == 0) && !rst;
  always @(posedge clk) begin
    slot  <= slot + 1;
    vpipe <= {vpipe[1:0], rd_grant};
    dpipe[0] <= {16'(2 * rd_addr + 1), 16'(2 * rd_addr)};
    dpipe[1] <= dpipe[0];
    dpipe[2] <= dpipe[1];
  end
  assign rd_valid = vpipe[2];
  assign rd_data  = dpipe[2];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int expect_pn = 0, frames = 0, de_count = 0, hs_pulses = 0, vs_lines = 0;
  int hs_len = 0, vs_pix = 0, idle_slots = 0;
  logic prev_hs = 0, prev_vs = 0;

  always @(posedge clk) if (!rst) begin
    if (slot == 0 && !rd_req) idle_slots++;
    if (vid_pix_en) begin
      if (vid_de) begin
        check(vid_pixel == 16'(expect_pn), $sformatf("pixel %0d shows %0d", expect_pn, vid_pixel));
        expect_pn = (expect_pn + 1) % (HA * VA);
        de_count++;
      end
      if (vid_hsync) hs_len++;
      if (!vid_hsync && prev_hs) begin check(hs_len == HS, $sformatf("hsync width %0d", hs_len)); hs_len = 0; hs_pulses++; end
      if (vid_vsync) vs_pix++;
      if (!vid_vsync && prev_vs) begin
        check(vs_pix == VS * HT, $sformatf("vsync width %0d", vs_pix));
        if (frames > 0) check(hs_pulses == VT, $sformatf("hsync pulses per frame %0d", hs_pulses));
        vs_pix = 0; hs_pulses = 0; frames++;
      end
      prev_hs = vid_hsync; prev_vs = vid_vsync;
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (frames == 4);
    check(underrun == 0, $sformatf("underruns %0d", underrun));
    check(de_count >= 3 * HA * VA, $sformatf("visible pixels %0d", de_count));
    check(idle_slots > 0, "read slot released while the prefetch buffer is full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
