// constants_rom: round constant ROM of the SHA-1 and SHA-256 datapath.
//
// The ROM has 80 entries of 64 bits. The upper 32 bits of entry t hold the
// SHA-1 constant of round t (one of four values, each used for 20 rounds) and
// the lower 32 bits hold the SHA-256 constant of round t (64 values; entries
// 64-79 are zero there). 'sel' chooses the half: SEL_SHA2 reads the SHA-256
// half, any other code the SHA-1 half. The output K is registered: it shows
// the constant for the 'address' present at the previous rising clock edge,
// and reset clears it. Entry layout, size and ports follow the document; the
// registered read is this design's choice (the ROM has a clock port).
module constants_rom
  import hp_pkg::*;
#(
  parameter int unsigned DEPTH = 80
) (
  input  logic               clk,
  input  logic               rst,
  input  alusel_e            sel,
  input  logic [ROUND_W-1:0] address,
  output word_t              k
);

  function automatic logic [63:0] entry(int unsigned t);
    word_t k1, k2;
    k1 = SHA1_K[(t / 20) % 4];
    k2 = (t < 64) ? SHA2_K[t % 64] : '0;
    return {k1, k2};
  endfunction

  logic [63:0] rom [DEPTH];

  initial begin
    for (int unsigned t = 0; t < DEPTH; t++) rom[t] = entry(t);
  end

  logic [63:0] row;
  assign row = (32'(address) < DEPTH) ? rom[address] : '0;

  always_ff @(posedge clk) begin
    if (rst)                k <= '0;
    else if (sel == SEL_SHA2) k <= row[31:0];
    else                      k <= row[63:32];
  end

endmodule
