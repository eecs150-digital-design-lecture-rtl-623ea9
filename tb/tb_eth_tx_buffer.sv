// tb_eth_tx_buffer: transmit buffer test. The CPU side writes the
// destination, the type and a random payload, then starts the frame; a
// MAC stand-in accepts bytes with random back-pressure. The captured
// frame must be destination, this node's address, type, payload, with
// tx_last on its final byte, and busy must read 1 while it is sent.
module tb_eth_tx_buffer;
  localparam logic [47:0] MY = 48'h00_0A_35_01_02_03;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [47:0] my_mac = MY;
  logic        reg_re = 0, reg_we = 0;
  logic [11:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic [7:0]  tx_data;
  logic        tx_valid, tx_last, tx_ready;

  eth_tx_buffer #(.BUF_BYTES(2048)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  byte unsigned got[$];
  int frames_done = 0;
  always @(negedge clk) tx_ready = ($urandom_range(3) != 0);
  always @(posedge clk) if (!rst && tx_valid && tx_ready) begin
    got.push_back(tx_data);
    if (tx_last) frames_done++;
  end

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); reg_re = 1; reg_addr = a;
    @(negedge clk); reg_re = 0; d = reg_rdata;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 12; n++) begin
      logic [47:0] dst;
      logic [15:0] ty;
      logic [31:0] d;
      byte unsigned exp[$];
      int len;
      dst = {$urandom, $urandom}; ty = (n == 0) ? 16'h0800 : 16'($urandom);
      len = (n == 0) ? 46 : (n == 1) ? 1500 : (n == 2) ? 0 : $urandom_range(300);
      exp.delete();
      for (int i = 0; i < 6; i++) exp.push_back(dst[47 - 8*i -: 8]);
      for (int i = 0; i < 6; i++) exp.push_back(MY[47 - 8*i -: 8]);
      exp.push_back(ty[15:8]); exp.push_back(ty[7:0]);
      for (int i = 0; i < len; i += 4) begin
        logic [31:0] w;
        w = $urandom;
        wr(12'h800 + 12'(i), w);
        for (int b = 0; b < 4 && i + b < len; b++) exp.push_back(w[31 - 8*b -: 8]);
      end
      wr(12'h000, {16'd0, dst[47:32]});
      wr(12'h004, dst[31:0]);
      wr(12'h008, {16'd0, ty});
      got.delete();
      wr(12'h00C, len);
      rd(12'h00C, d); check(d[0] == 1'b1, "busy while sending");
      wait (frames_done == n + 1);
      repeat (2) @(negedge clk);
      rd(12'h00C, d); check(d[0] == 1'b0, "idle after the frame");
      check(got.size() == exp.size(), $sformatf("frame %0d: %0d bytes want %0d", n, got.size(), exp.size()));
      foreach (exp[i]) if (i < got.size())
        check(got[i] == exp[i], $sformatf("frame %0d byte %0d", n, i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
