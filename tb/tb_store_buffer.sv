// tb_store_buffer: dual-clock FIFO test. The writer runs at 80 MHz and the
// reader at 99 MHz, then the reader is slowed so the FIFO fills. Random
// data is pushed whenever not full and popped whenever not empty; the
// popped sequence must equal the pushed one, and the FIFO must have been
// seen full (so the full flag really stops the writer) and empty.
module tb_store_buffer;
  localparam int W = 36, D = 8;

  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wdata = 0, rdata;

  always #6.25  wclk = ~wclk;   // 80 MHz
  always #5.05  rclk = ~rclk;   // 99 MHz

  store_buffer #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int n_full = 0, n_read = 0, rd_pct = 90, level = 0, max_level = 0;
  localparam int N = 3000;
  int n_written = 0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  always @(posedge wclk) begin
    if (!wrst) begin
      if (wr_en && !full) begin q.push_back(wdata); n_written++; end
      if (full) n_full++;
    end
  end
  always @(negedge wclk) begin
    wr_en <= (n_written < N) && ($urandom_range(99) < 80) && !full;
    wdata <= {$urandom, 4'($urandom)};
  end

  // reader
  always @(posedge rclk) begin
    if (!rrst && rd_en && !empty) begin
      checks++;
      if (q.size() == 0 || rdata != q[0]) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d", n_read);
      end
      if (q.size() != 0) void'(q.pop_front());
      n_read++;
    end
  end
  always @(negedge rclk) begin
    rd_en <= ($urandom_range(99) < rd_pct) && !empty;
    if (n_read > N/3) rd_pct = 20;
    if (n_read > 2*N/3) rd_pct = 100;
  end

  initial begin
    repeat (3) @(posedge wclk);
    wrst = 0; rrst = 0;
    wait (n_read == N);
    repeat (10) @(posedge rclk);
    checks++; if (!empty) failures++;
    checks++; if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
