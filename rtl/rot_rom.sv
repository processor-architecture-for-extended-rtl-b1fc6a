// rot_rom: coefficient ROM of one butterfly stage D_k.
//
// Holds cos(theta_{m,k}) and sin(theta_{m,k}) for the M/2 butterflies
// m = 0..M/2-1 of the butterfly matrix D_k. The table is computed at
// elaboration from the angle function elt_pkg::theta and rounded to the
// CW.CF coefficient format. The read is asynchronous: cos_o/sin_o follow addr
// in the same cycle. That a ROM feeds each butterfly comes from the
// architecture; the angle values themselves are free parameters of an ELT, and
// the default set in elt_pkg is this design's choice.
module rot_rom
  import elt_pkg::*;
#(
  parameter int unsigned M    = 32,
  parameter int unsigned K    = 2,
  parameter int unsigned KIDX = 0     // which D_k this ROM serves
) (
  input  logic [$clog2(M/2)-1:0] addr,
  output coef_t                  cos_o,
  output coef_t                  sin_o
);
  localparam int unsigned H = M / 2;

  typedef coef_t tab_t [H];

  function automatic tab_t mk_cos();
    tab_t t;
    for (int unsigned m = 0; m < H; m++) t[m] = to_coef($cos(theta(m, KIDX, M, K)));
    return t;
  endfunction

  function automatic tab_t mk_sin();
    tab_t t;
    for (int unsigned m = 0; m < H; m++) t[m] = to_coef($sin(theta(m, KIDX, M, K)));
    return t;
  endfunction

  localparam tab_t COS_TAB = mk_cos();
  localparam tab_t SIN_TAB = mk_sin();

  assign cos_o = COS_TAB[addr];
  assign sin_o = SIN_TAB[addr];

endmodule
