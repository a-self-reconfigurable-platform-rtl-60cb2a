// hwicap_bram: the HWICAP storage buffer, a 16 Kbit true dual-port block RAM
// with asymmetric ports (the RAMB16_S9_S36 arrangement without parity bits).
//
// Port A is 2048 x 8 bits and faces the configuration port; port B is
// 512 x 32 bits and faces the OPB. Byte 4w+0 of port A is bits [31:24] of
// word w on port B (big-endian, as the OPB numbers its bytes). Both ports
// are synchronous: with the enable high, a write takes effect at the clock
// edge and the output register loads the location's old contents
// (read-before-write); with the enable low the output holds. Both ports run
// on one clock here. If both ports write the same byte in one cycle,
// port B wins (this design's choice).
module hwicap_bram (
  input  logic        clk,
  // port A: 8 bits
  input  logic        ena,
  input  logic        wea,
  input  logic [10:0] addra,
  input  logic [7:0]  dia,
  output logic [7:0]  doa,
  // port B: 32 bits
  input  logic        enb,
  input  logic        web,
  input  logic [8:0]  addrb,
  input  logic [31:0] dib,
  output logic [31:0] dob
);
  logic [7:0] mem [2048];

  always_ff @(posedge clk) begin
    if (ena) begin
      doa <= mem[addra];
      if (wea) mem[addra] <= dia;
    end
    if (enb) begin
      dob <= {mem[{addrb, 2'd0}], mem[{addrb, 2'd1}], mem[{addrb, 2'd2}], mem[{addrb, 2'd3}]};
      if (web) begin
        mem[{addrb, 2'd0}] <= dib[31:24];
        mem[{addrb, 2'd1}] <= dib[23:16];
        mem[{addrb, 2'd2}] <= dib[15:8];
        mem[{addrb, 2'd3}] <= dib[7:0];
      end
    end
  end
endmodule
