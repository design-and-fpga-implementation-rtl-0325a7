// datapath: the hash processor's datapath. It joins the message expansion
// block, the constants ROM, the register file and the ALU.
//
// One SHA round takes three instructions. RRGF copies the chaining variables
// from the register file into its eight read-port registers, which feed the
// ALU inputs A..H. SHA1/SHA2 then has the ALU compute one round from those
// variables, the schedule word W_t of the message expansion block and the
// constant K_t of the ROM, and registers the result. SRGF writes the eight
// ALU result registers back through the eight register file write ports.
// The round number in 'ctrl.round' addresses both the message RAM and the
// ROM. 'ctrl.alu_sel' selects the ALU operation, the schedule formula and the
// ROM half. The message RAM is written from the accumulator 'acc' when
// 'ctrl.m_we' is high. Each executed round also stores its W_t back in the
// RAM. ADD/SUB/AND/OR work on 'acc' and 'mem_data' and show on alu_out and
// alu_sign. All control comes from the control unit through 'ctrl'.
// The block split and the connections follow the datapath figure; the
// control bundle and the use of the accumulator as message data source are
// this design's choices.
module datapath
  import hp_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  dp_ctrl_t ctrl,
  input  word_t    acc,
  input  word_t    mem_data,
  output word_t    chain [8],   // ALU result registers A_out .. H_out
  output word_t    alu_out,
  output logic     alu_sign
);

  word_t w, k;
  word_t rf_out [RF_PORTS];
  logic  step;

  assign step = ctrl.alu_e && (ctrl.alu_sel == SEL_SHA1 || ctrl.alu_sel == SEL_SHA2);

  message_expansion u_msg (
    .clk   (clk),
    .we    (ctrl.m_we),
    .step  (step),
    .round (ctrl.round),
    .sel   (ctrl.alu_sel),
    .di    (acc),
    .w     (w)
  );

  constants_rom u_rom (
    .clk     (clk),
    .rst     (rst),
    .sel     (ctrl.alu_sel),
    .address (ctrl.round),
    .k       (k)
  );

  register_file u_rf (
    .clk    (clk),
    .rst    (rst),
    .we     (ctrl.rf_we),
    .re     (ctrl.rf_re),
    .wa     (ctrl.rf_wa),
    .ra     (ctrl.rf_ra),
    .rf_in  (chain),
    .rf_out (rf_out)
  );

  alu u_alu (
    .clk      (clk),
    .rst      (rst),
    .alu_e    (ctrl.alu_e),
    .round    (ctrl.round),
    .sel      (ctrl.alu_sel),
    .acc_in   (acc),
    .mem_data (mem_data),
    .v_in     (rf_out),
    .k        (k),
    .w        (w),
    .alu_sign (alu_sign),
    .alu_out  (alu_out),
    .v_out    (chain)
  );

endmodule
