// sram_model: behavioural model of the external synchronous frame-buffer
// SRAM, for simulation only. 2^AW words of 32 bits with active-low byte
// write enables. A write (we_n low, with the FPGA driving the data pins)
// stores the enabled bytes at the clock edge. A read (oe_n low) returns
// mem[addr] on dq_out after RD_LAT clock edges, as a pipelined synchronous
// SRAM does. The chip is not part of the RTL: it sits on the board.
module sram_model #(
  parameter int unsigned AW     = 19,
  parameter int unsigned RD_LAT = 2
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we_n,
  input  logic          oe_n,
  input  logic [3:0]    bwe_n,
  input  logic [31:0]   dq_in,
  input  logic          dq_in_en,
  output logic [31:0]   dq_out
);
  logic [31:0] mem [2**AW];
  logic [31:0] pipe [RD_LAT];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    for (int i = 0; i < RD_LAT; i++) pipe[i] = '0;
  end

  always @(posedge clk) begin
    if (!we_n && dq_in_en) begin
      for (int b = 0; b < 4; b++)
        if (!bwe_n[b]) mem[addr][8*b +: 8] <= dq_in[8*b +: 8];
    end
    pipe[0] <= (!oe_n) ? mem[addr] : 32'hDEAD_BEEF;
    for (int i = 1; i < RD_LAT; i++) pipe[i] <= pipe[i-1];
  end

  assign dq_out = pipe[RD_LAT-1];
endmodule
