// eth_rx_buffer: receive side of the interface between the FPGA's
// Ethernet MAC and the CPU: packet buffering, simple filtering and a
// polling interface.
//
// The MAC delivers each received frame as a byte stream (destination
// address first, frame check sequence already removed) with rx_last on
// the final byte and rx_bad beside it when the MAC found a CRC or other
// error. Frames are written into NBUF packet slots used as a ring. A
// frame is kept only if its destination address is this node's unicast
// address (my_mac) or the broadcast address, it is not bad, it is at
// least a 14-byte MAC header long and it fits its slot. A frame that
// starts while every slot is full is dropped. Kept frames queue up in
// arrival order for the CPU.
//
// CPU registers (byte offsets, 32-bit words, reads return data on the
// cycle after reg_re):
//   0x000 read : STATUS  [31] a packet is waiting, [15:0] its length in bytes
//   0x000 write: release the waiting packet (any data)
//   0x004 read : frames dropped (no free slot, bad, runt or too long)
//   0x008 read : frames filtered out by destination address
//   0x800..    : the waiting packet, 4 bytes per word, first byte in [31:24]
// The document asks for FIFO buffering, simple filtering and a polling
// interface; the frame interface, the slot ring, the register map and the
// filter rule are this design's own. Single clock: the MAC client side is
// assumed to run on the CPU clock.
module eth_rx_buffer #(
  parameter int unsigned NBUF      = 2,     // packet slots, power of two
  parameter int unsigned BUF_BYTES = 2048   // bytes per slot, power of two, <= 2048
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [47:0] my_mac,
  // MAC client receive stream
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  input  logic        rx_last,
  input  logic        rx_bad,
  // CPU register port
  input  logic        reg_re,
  input  logic        reg_we,
  input  logic [11:0] reg_addr,
  output logic [31:0] reg_rdata
);

  localparam int unsigned SW    = (NBUF > 1) ? $clog2(NBUF) : 1;
  localparam int unsigned WPB   = BUF_BYTES / 4;          // words per slot
  localparam int unsigned WAW   = $clog2(WPB);
  localparam int unsigned LW    = 16;

  logic [31:0]   mem [NBUF*WPB];
  logic [LW-1:0] len [NBUF];

  logic [SW-1:0] wslot, rslot;
  logic [SW:0]   count;
  logic          in_frame, keep, match_uc, match_bc;
  logic [LW-1:0] pos_r;
  logic [31:0]   dropped, filtered;

  // Per-byte filter evaluation
  logic [LW-1:0] pos;
  logic          uc_n, bc_n, commit, release_pkt;
  logic [7:0]    mac_byte;
  logic          keep_n;
  logic [1:0]    lane;

  always_comb begin
    pos      = in_frame ? pos_r : '0;
    lane     = ~pos[1:0];                 // byte 0 of a word in [31:24]
    keep_n   = in_frame ? keep : (32'(count) < NBUF);
    mac_byte = (pos < 6) ? my_mac[47 - 8*pos[2:0] -: 8] : 8'h00;
    uc_n     = (pos == 0) ? 1'b1 : match_uc;
    bc_n     = (pos == 0) ? 1'b1 : match_bc;
    if (pos < 6) begin
      uc_n = uc_n && (rx_data == mac_byte);
      bc_n = bc_n && (rx_data == 8'hFF);
    end
    commit = rx_valid && rx_last && keep_n && !rx_bad && (uc_n || bc_n) &&
             (32'(pos) + 1 >= 14) && (32'(pos) + 1 <= BUF_BYTES);
    release_pkt = reg_we && (reg_addr == 12'h000) && (count != 0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_frame <= 1'b0; keep <= 1'b0; match_uc <= 1'b0; match_bc <= 1'b0;
      pos_r <= '0; wslot <= '0; rslot <= '0; count <= '0;
      dropped <= '0; filtered <= '0;
    end else begin
      if (rx_valid) begin
        in_frame <= !rx_last;
        keep     <= keep_n;
        match_uc <= uc_n;
        match_bc <= bc_n;
        pos_r    <= (pos == '1) ? pos : pos + 1'b1;
        if (rx_last) begin
          if (commit) begin
            wslot <= wslot + 1'b1;
          end else if (keep_n && !rx_bad && !(uc_n || bc_n) && 32'(pos) + 1 >= 6) begin
            filtered <= filtered + 1;
          end else begin
            dropped <= dropped + 1;
          end
        end
      end
      if (release_pkt) rslot <= rslot + 1'b1;
      count <= count + (SW+1)'(commit) - (SW+1)'(release_pkt);
    end
  end

  // Packet memory and lengths
  always_ff @(posedge clk) begin
    if (rx_valid && keep_n && 32'(pos) < BUF_BYTES)
      mem[{wslot, pos[WAW+1:2]}][8*lane +: 8] <= rx_data;
    if (commit) len[wslot] <= pos + 1'b1;
  end

  // CPU reads
  always_ff @(posedge clk) begin
    if (rst) begin
      reg_rdata <= '0;
    end else if (reg_re) begin
      if (reg_addr[11]) begin
        reg_rdata <= mem[{rslot, reg_addr[WAW+1:2]}];
      end else begin
        unique case (reg_addr)
          12'h000: reg_rdata <= {count != 0, 15'd0, (count != 0) ? len[rslot] : 16'd0};
          12'h004: reg_rdata <= dropped;
          12'h008: reg_rdata <= filtered;
          default: reg_rdata <= '0;
        endcase
      end
    end
  end

  initial begin
    assert (BUF_BYTES <= 2048 && (BUF_BYTES & (BUF_BYTES - 1)) == 0 && (NBUF & (NBUF - 1)) == 0)
      else $error("eth_rx_buffer: BUF_BYTES and NBUF must be powers of two, BUF_BYTES <= 2048");
  end

endmodule
