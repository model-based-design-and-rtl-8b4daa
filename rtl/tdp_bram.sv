// True dual-port block RAM shared by the processor and the programmable
// logic.
//
// 32-bit words, byte addressed (the two low address bits are ignored), with
// a byte write enable per lane on each port. Port A is the processor's
// channel (behind its AXI BRAM controller), port B the logic's channel used
// by the BRAM wrapper. Each port has its own clock.
//
// Timing: a read returns the word one clock after the enabled request; a
// write takes effect at the clock edge, and the same port returns the old
// word (read-first). Writing one word from both ports in the same cycle
// leaves it undefined, as in FPGA block RAM. The size (4 KB) is this
// implementation's choice; it covers the address map 0x000-0x200 in use.
// The array is written from both ports' clock processes, which is why they
// are plain always blocks rather than always_ff. Lint reports the array as
// driven from two blocks with different clocks; that is intended: it is the
// usual way to describe a true dual-port RAM, which FPGA tools map onto one
// block RAM with two independent write ports.
module tdp_bram #(
  parameter int ADDR_W = 12,
  parameter int DATA_W = 32,
  localparam int NB    = DATA_W / 8,
  localparam int WORDS = (1 << ADDR_W) / NB,
  localparam int LSB   = $clog2(NB)
) (
  input  logic              clka,
  input  logic              ena,
  input  logic [NB-1:0]     wea,
  input  logic [ADDR_W-1:0] addra,
  input  logic [DATA_W-1:0] dina,
  output logic [DATA_W-1:0] douta,
  input  logic              clkb,
  input  logic              enb,
  input  logic [NB-1:0]     web,
  input  logic [ADDR_W-1:0] addrb,
  input  logic [DATA_W-1:0] dinb,
  output logic [DATA_W-1:0] doutb
);

  logic [DATA_W-1:0] mem [WORDS];

  // Cleared so that the shared words start at zero (QueueEnable false,
  // Scheduler Select 0); block RAM takes this from its initial contents.
  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end

  always @(posedge clka) begin
    if (ena) begin
      douta <= mem[addra[ADDR_W-1:LSB]];
      for (int b = 0; b < NB; b++)
        if (wea[b]) mem[addra[ADDR_W-1:LSB]][b*8 +: 8] <= dina[b*8 +: 8];
    end
  end

  always @(posedge clkb) begin
    if (enb) begin
      doutb <= mem[addrb[ADDR_W-1:LSB]];
      for (int b = 0; b < NB; b++)
        if (web[b]) mem[addrb[ADDR_W-1:LSB]][b*8 +: 8] <= dinb[b*8 +: 8];
    end
  end

endmodule
