// register_file: sixteen 32-bit registers holding the chaining variables of
// SHA-1 (registers 0-4) and SHA-256 (registers 5-12); registers 13-15 are
// spare.
//
// Eight write ports share one write enable: when 'we' is high, on the rising
// edge every port p writes rf_in[p] into register wa[p]. If two ports name the
// same register the higher-numbered port wins. Eight read ports each have an
// enable: when re[p] is high, on the rising edge read port p captures register
// ra[p] into its output register rf_out[p], which otherwise holds its value.
// A read and a write of the same register in one cycle return the old value.
// Reset loads the SHA-1 and SHA-256 initial hash values into their registers
// and clears the spare registers and the read outputs.
// The register count, the port count and the role of the registers follow the
// document; the register map, the registered read outputs, the write priority
// and the initial-value reset are this design's choices.
module register_file
  import hp_pkg::*;
#(
  parameter int unsigned NREGS = 16
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          we,
  input  logic [RF_PORTS-1:0]           re,
  input  logic [RF_PORTS-1:0][RF_AW-1:0] wa,
  input  logic [RF_PORTS-1:0][RF_AW-1:0] ra,
  input  word_t                         rf_in  [RF_PORTS],
  output word_t                         rf_out [RF_PORTS]
);

  word_t regs [NREGS];

  function automatic word_t reset_value(int unsigned r);
    if (r < 5)                                        return SHA1_IV[r];
    else if (r >= 32'(RF_SHA2_BASE) && r < 32'(RF_SHA2_BASE) + 8) return SHA2_IV[r - 32'(RF_SHA2_BASE)];
    else                                              return '0;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned r = 0; r < NREGS; r++) regs[r] <= reset_value(r);
    end else if (we) begin
      for (int unsigned p = 0; p < RF_PORTS; p++) regs[wa[p]] <= rf_in[p];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned p = 0; p < RF_PORTS; p++) rf_out[p] <= '0;
    end else begin
      for (int unsigned p = 0; p < RF_PORTS; p++)
        if (re[p]) rf_out[p] <= regs[ra[p]];
    end
  end

endmodule
