// wa_mux: register-file write-address select (WASEL).
//
// A 5-bit 2-to-1 multiplexer. With WASEL = 0 the destination is the Rc field
// of the instruction (bits 25:21); with WASEL = 1 it is XP (register 30), the
// register that receives PC+4 when an interrupt or an illegal-instruction trap
// is taken. Purely combinational. Input numbering and widths follow the lab's
// block diagram.
module wa_mux
  import beta_pkg::*;
(
  input  logic       wasel,
  input  logic [4:0] rc,
  output logic [4:0] wa
);

  assign wa = wasel ? XP_REG : rc;

endmodule
