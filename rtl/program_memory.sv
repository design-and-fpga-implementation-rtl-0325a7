// program_memory: 32 x 32-bit RAM that holds the hash processor's program and
// its data words (loop counter, increment, round limit).
//
// A write stores 'di' at address 'a' on the rising clock edge when 'we' is
// high; a read is asynchronous, so 'dout' shows the addressed word in the same
// cycle. Size, ports and the write/read timing follow the processor's program
// memory description; the port called 'do' there is named 'dout' here because
// 'do' is a SystemVerilog keyword. The memory has no reset: its contents are
// loaded by the control unit's fill sequence before the program runs.
module program_memory #(
  parameter int unsigned DEPTH  = 32,
  parameter int unsigned AW     = $clog2(DEPTH),
  parameter int unsigned WIDTH  = 32
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    a,
  input  logic [WIDTH-1:0] di,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[a] <= di;
  end

  assign dout = mem[a];

endmodule
