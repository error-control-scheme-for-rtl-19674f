// cpc_checker: outer-code check of the system-level fault manager.
//
// Re-encodes the (already RK-corrected) data word with the CPC and compares
// the result with the CPC redundancy that travelled through the RK code.
// ok = 1 when they agree. A mismatch reveals an RK miscorrection or an error
// the RK code did not detect. Combinational.
module cpc_checker
  import rk_pkg::*;
#(
  parameter int unsigned KBITS = 64,
  parameter int unsigned RO    = 4
) (
  input  logic [KBITS-1:0] x,
  input  logic [RO-1:0]    o,
  output logic             ok
);
  logic [RO-1:0] o_re;

  cpc_encoder #(.KBITS(KBITS), .RO(RO)) u_enc (.x(x), .o(o_re));
  assign ok = (o_re == o);
endmodule
