// message_expansion: stores the 512-bit message block and produces the
// message schedule word W_t of the current round for SHA-1 or SHA-256.
//
// An 80 x 32 RAM holds the schedule. The 16 words of the block are written
// into entries 0-15 with 'we' (data 'di', address 'round'). For a round t
// the output 'w' is entry t when t < 16, and otherwise the expansion of
// earlier entries:
//   SHA-1   (sel = SEL_SHA1): ROTL1(W[t-3] ^ W[t-8] ^ W[t-14] ^ W[t-16])
//   SHA-256 (sel = SEL_SHA2): sigma1(W[t-2]) + W[t-7] + sigma0(W[t-15]) + W[t-16]
// The four earlier entries are read through four asynchronous read ports,
// one per copy of the RAM in an FPGA mapping. When 'step' is high (the ALU is
// executing a round), the rising edge stores W_t into entry t so later rounds
// can read it; for t < 16 this rewrites the same word. 'w' is combinational
// from 'round', 'sel' and the RAM. Reset clears nothing: the RAM is loaded
// before use.
// The 80-word RAM, the four reads and the two schedules follow the document;
// the separate 'step' write of expanded words is this design's choice.
module message_expansion
  import hp_pkg::*;
#(
  parameter int unsigned DEPTH = 80
) (
  input  logic               clk,
  input  logic               we,
  input  logic               step,
  input  logic [ROUND_W-1:0] round,
  input  alusel_e            sel,
  input  word_t              di,
  output word_t              w
);

  word_t ram [DEPTH];

  logic [ROUND_W-1:0] ra [4];
  word_t              rd [4];
  word_t              expanded;
  logic               in_range;

  assign in_range = 32'(round) < DEPTH;

  // Read addresses of the four schedule taps.
  always_comb begin
    if (sel == SEL_SHA2) begin
      ra[0] = round - 7'd2;
      ra[1] = round - 7'd7;
      ra[2] = round - 7'd15;
      ra[3] = round - 7'd16;
    end else begin
      ra[0] = round - 7'd3;
      ra[1] = round - 7'd8;
      ra[2] = round - 7'd14;
      ra[3] = round - 7'd16;
    end
    for (int i = 0; i < 4; i++) rd[i] = (32'(ra[i]) < DEPTH) ? ram[ra[i]] : '0;
  end

  always_comb begin
    if (sel == SEL_SHA2) expanded = small_sigma1(rd[0]) + rd[1] + small_sigma0(rd[2]) + rd[3];
    else                 expanded = rotl(rd[0] ^ rd[1] ^ rd[2] ^ rd[3], 1);
    if (round < 7'd16)   w = ram[round];
    else if (in_range)   w = expanded;
    else                 w = '0;
  end

  always_ff @(posedge clk) begin
    if (in_range) begin
      if (we)        ram[round] <= di;
      else if (step) ram[round] <= w;
    end
  end

endmodule
