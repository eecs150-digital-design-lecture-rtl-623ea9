// eth_tx_buffer: transmit side of the interface between the CPU and the
// FPGA's Ethernet MAC: packet buffer and MAC header creation.
//
// The CPU fills a payload buffer, sets the destination address and the
// type field, and starts transmission by writing the payload length. The
// block then streams the frame to the MAC one byte per accepted cycle:
// the 14-byte MAC header it builds itself (6-byte destination, 6-byte
// source = my_mac, 2-byte type, most significant byte first), then the
// payload. The MAC adds the preamble and the CRC (and pads short frames).
//
// CPU registers (byte offsets, 32-bit words, reads return data on the
// cycle after reg_re):
//   0x000 write: destination address bytes 0..1 in [15:0]
//   0x004 write: destination address bytes 2..5 in [31:0]
//   0x008 write: type field in [15:0] (for example 0x0800 for IP)
//   0x00C write: payload length in bytes, starts transmission
//   0x00C read : [0] busy (a frame is being sent; writes to 0x00C are ignored)
//   0x800..    : payload, 4 bytes per word, first byte in [31:24] (write only)
// Stream: tx_data/tx_valid/tx_last with tx_ready from the MAC; a byte moves
// when tx_valid and tx_ready are both high. The header layout follows the
// document; the register map and the stream handshake are this design's
// own. Single clock: the MAC client side is assumed to run on the CPU clock.
module eth_tx_buffer #(
  parameter int unsigned BUF_BYTES = 2048   // payload bytes, power of two, <= 2048
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [47:0] my_mac,
  // CPU register port
  input  logic        reg_re,
  input  logic        reg_we,
  input  logic [11:0] reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // MAC client transmit stream
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  output logic        tx_last,
  input  logic        tx_ready
);

  localparam int unsigned WPB = BUF_BYTES / 4;
  localparam int unsigned WAW = $clog2(WPB);
  localparam int unsigned LW  = 16;
  localparam int unsigned HDR = 14;

  logic [31:0]   mem [WPB];
  logic [47:0]   dst;
  logic [15:0]   etype;
  logic [LW-1:0] plen, idx;
  logic          busy;

  logic          start;
  assign start = reg_we && (reg_addr == 12'h00C) && !busy;

  always_ff @(posedge clk) begin
    if (reg_we && reg_addr[11]) mem[reg_addr[WAW+1:2]] <= reg_wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dst <= '0; etype <= '0; plen <= '0; idx <= '0; busy <= 1'b0;
    end else begin
      if (reg_we && !busy) begin
        unique case (reg_addr)
          12'h000: dst[47:32] <= reg_wdata[15:0];
          12'h004: dst[31:0]  <= reg_wdata;
          12'h008: etype      <= reg_wdata[15:0];
          default: ;
        endcase
      end
      if (start) begin
        plen <= (32'(reg_wdata) > BUF_BYTES) ? LW'(BUF_BYTES) : reg_wdata[LW-1:0];
        idx  <= '0;
        busy <= 1'b1;
      end else if (busy && tx_ready) begin
        if (tx_last) busy <= 1'b0;
        else         idx  <= idx + 1'b1;
      end
    end
  end

  // Byte selection: header, then payload
  logic [LW-1:0] p;
  logic [31:0]   pword;
  logic [1:0]    lane;
  always_comb begin
    p     = idx - LW'(HDR);
    pword = mem[p[WAW+1:2]];
    lane  = ~p[1:0];                     // byte 0 of a word in [31:24]
    if (idx < 6)        tx_data = dst[47 - 8*idx[2:0] -: 8];
    else if (idx < 12)  tx_data = my_mac[47 - 8*(32'(idx) - 6) -: 8];
    else if (idx < 14)  tx_data = (idx == 12) ? etype[15:8] : etype[7:0];
    else                tx_data = pword[8*lane +: 8];
    tx_valid = busy;
    tx_last  = busy && (32'(idx) == HDR + 32'(plen) - 1);
  end

  always_ff @(posedge clk) begin
    if (rst)          reg_rdata <= '0;
    else if (reg_re)  reg_rdata <= (reg_addr == 12'h00C) ? {31'd0, busy} : 32'd0;
  end

  a_stable: assert property (@(posedge clk) disable iff (rst)
                             tx_valid && !tx_ready |=> tx_valid && $stable(tx_data));

endmodule
