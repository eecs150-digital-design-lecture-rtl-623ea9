// tb_eth_rx_buffer: receive buffer test. Frames addressed to this node,
// broadcast frames, frames for another node, frames flagged bad by the
// MAC, runts, and frames that arrive while both slots are full are sent
// with random gaps. The CPU side polls STATUS, reads each kept frame back
// word by word and releases it. Kept frames must come back intact and in
// order; the drop and filter counters must match the frames sent.
module tb_eth_rx_buffer;
  localparam logic [47:0] MY = 48'h00_0A_35_01_02_03;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [47:0] my_mac = MY;
  logic [7:0]  rx_data = 0;
  logic        rx_valid = 0, rx_last = 0, rx_bad = 0;
  logic        reg_re = 0, reg_we = 0;
  logic [11:0] reg_addr = 0;
  logic [31:0] reg_rdata;

  eth_rx_buffer #(.NBUF(2), .BUF_BYTES(2048)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  typedef byte unsigned frame_t[$];
  frame_t kept[$];

  function automatic frame_t make(input logic [47:0] dst, input int len);
    frame_t f;
    for (int i = 0; i < 6; i++) f.push_back(dst[47 - 8*i -: 8]);
    for (int i = 6; i < len; i++) f.push_back(8'($urandom));
    return f;
  endfunction

  task automatic send(input frame_t f, input bit bad);
    foreach (f[i]) begin
      @(negedge clk);
      rx_valid = 1; rx_data = f[i]; rx_last = (i == f.size() - 1); rx_bad = bad && rx_last;
      if ($urandom_range(3) == 0) begin @(negedge clk); rx_valid = 0; end
    end
    @(negedge clk); rx_valid = 0; rx_last = 0; rx_bad = 0;
  endtask

  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); reg_re = 1; reg_addr = a;
    @(negedge clk); reg_re = 0; d = reg_rdata;
  endtask

  task automatic release_pkt();
    @(negedge clk); reg_we = 1; reg_addr = 12'h000;
    @(negedge clk); reg_we = 0;
  endtask

  // read the waiting frame and compare it with the oldest kept one
  task automatic receive_one();
    logic [31:0] st, w;
    frame_t f;
    rd(12'h000, st);
    check(st[31], $sformatf("a frame is waiting (%0d left)", kept.size()));
    if (!st[31]) return;
    f = kept.pop_front();
    check(st[15:0] == 16'(f.size()), $sformatf("length %0d want %0d", st[15:0], f.size()));
    for (int i = 0; i < f.size(); i += 4) begin
      rd(12'h800 + 12'(i), w);
      for (int b = 0; b < 4 && i + b < f.size(); b++)
        check(w[31 - 8*b -: 8] == f[i+b], $sformatf("byte %0d", i + b));
    end
    release_pkt();
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_t f;
    logic [31:0] d;
    int n_drop = 0, n_filt = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    rd(12'h000, d); check(!d[31], "empty after reset");
    // unicast and broadcast are kept
    f = make(MY, 64);   send(f, 0); kept.push_back(f);
    f = make('1, 100);  send(f, 0); kept.push_back(f);
    // both slots full: this one is dropped
    f = make(MY, 80);   send(f, 0); n_drop++;
    receive_one(); receive_one();
    rd(12'h000, d); check(!d[31], "empty after two releases");
    // other node, bad CRC, runt
    f = make(48'h00_0A_35_01_02_04, 70); send(f, 0); n_filt++;
    f = make(MY, 70);   send(f, 1); n_drop++;
    f = make(MY, 10);   send(f, 0); n_drop++;
    rd(12'h000, d); check(!d[31], "nothing kept from rejected frames");
    // longest frame and a stream of random ones
    f = make(MY, 1514); send(f, 0); kept.push_back(f);
    receive_one();
    for (int n = 0; n < 30; n++) begin
      int kind;
      kind = $urandom_range(3);
      f = make(kind == 0 ? 48'h12_34_56_78_9A_BC : (kind == 1 ? '1 : MY), 14 + $urandom_range(200));
      send(f, 0);
      if (kind == 0) n_filt++; else begin kept.push_back(f); receive_one(); end
    end
    rd(12'h004, d); check(d == 32'(n_drop), $sformatf("dropped %0d want %0d", d, n_drop));
    rd(12'h008, d); check(d == 32'(n_filt), $sformatf("filtered %0d want %0d", d, n_filt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
