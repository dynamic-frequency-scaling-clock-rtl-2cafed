// scpb: behavioural model of the modified dynamic controlled smooth charge
// phase blender (a transistor-level circuit: inverters and transmission gates).
//
// Input a is the leading phase and b the lagging one. Output oa is a buffered
// copy of a, delayed by D_BUF_PS; output oab carries an edge midway between
// the matching edges of a and b, delayed by the same D_BUF_PS, so the pair
// (oa, oab) adds one phase halfway between two delay line phases. The real
// blender triggers its output from tap T1 (after two transmission gates) or
// tap T2 (after four); T1 suits phase differences below about 460 ps and T2
// larger ones, and the DLL's coarse code (sel_t2) makes the choice. The model
// places the edge exactly in the middle when the tap suits the phase
// difference and WRONG_TAP_ERR_PS late otherwise, standing for the larger
// blending error of the unsuited tap. Both edges are blended alike.
// The blend rule and the tap choice follow the source design; the delays and
// the error size are this design's choices. D_BUF_PS must exceed half the
// largest phase difference; larger differences (start-up) pass b unblended.
module scpb #(
  parameter int unsigned D_BUF_PS         = 400,
  parameter int unsigned TAP_SPLIT_PS     = 460,
  parameter int unsigned WRONG_TAP_ERR_PS = 40
) (
  input  logic a,
  input  logic b,
  input  logic sel_t2,
  output logic oa,
  output logic oab
);
  timeunit 1ps;
  timeprecision 1ps;

  longint ta [2];   // last rising [1] and falling [0] edge time of a

  initial begin
    oa    = 1'b0;
    oab   = 1'b0;
    ta[0] = -1;
    ta[1] = -1;
  end

  always @(posedge a or negedge a) begin
    automatic logic v = a;
    ta[v] = longint'($time);
    fork
      #(D_BUF_PS) oa = v;
    join_none
  end

  always @(posedge b or negedge b) begin
    automatic logic   v    = b;
    automatic longint diff = longint'($time) - ta[v];
    automatic longint d;
    if (ta[v] < 0 || diff < 0 || diff >= 2 * longint'(D_BUF_PS)) diff = 0;
    d = longint'(D_BUF_PS) - diff / 2;
    if (diff != 0 && (sel_t2 != (diff >= longint'(TAP_SPLIT_PS)))) d += longint'(WRONG_TAP_ERR_PS);
    fork
      #(d) oab = v;
    join_none
  end
endmodule
