// dfs_pkg: types and constants shared by the dual output DLL clock generator
// and the power efficiency optimization unit.
//
// The DLL has a six-stage delay line (six phases), a smooth charge phase
// blender that doubles them to twelve phases, and edge combiners steered by a
// 12-bit program vector S[11:0]. The coarse stage of every delay cell is one
// of three; the fine tune is set by eight charge-detecting lines whose weights
// are 40, 30, 20, 10, 5, 3, 2 and 1 fine steps of 5 ps, with at most 43 steps
// in a cell. These numbers follow the source design. The helper si_pattern()
// builds the program vectors of the frequency/phase table: a multiplication
// factor m uses 2m equally spaced phases, and the phase index shifts the
// pattern by one twelfth of the reference period.
package dfs_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N_DDL_PHASES = 6;   // delay cells / DLL phases
  localparam int unsigned N_PHASES     = 12;  // phases after the blender
  localparam int unsigned N_FINE_CDL   = 8;   // weighted fine-tune CDLs
  localparam int unsigned FINE_STEPS   = 43;  // fine steps available in a cell
  localparam int unsigned FINE_STEP_PS = 5;   // fine resolution
  localparam int unsigned LOCK_CYCLES  = 10;  // fixed locking time

  // Weight (in fine steps) controlled by each fine CDL, opened in this order.
  localparam int unsigned FINE_W [N_FINE_CDL] = '{40, 30, 20, 10, 5, 3, 2, 1};

  // Coarse stage of the low power delay cell; stage 1 is the shortest.
  typedef enum logic [1:0] {
    STAGE_NONE = 2'd0,
    STAGE_1    = 2'd1,
    STAGE_2    = 2'd2,
    STAGE_3    = 2'd3
  } coarse_stage_t;

  // Transmission-gate controls of the coarse tune section.
  typedef struct packed {
    logic t2, t2n, t3, t3n;
    logic d1, d1n, d2, d2n, d3, d3n;
  } coarse_ctl_t;

  // Output multiplication factors of an edge combiner.
  typedef enum logic [2:0] {
    MULT_0P5 = 3'd0,
    MULT_1   = 3'd1,
    MULT_1P5 = 3'd2,
    MULT_2   = 3'd3,
    MULT_3   = 3'd4,
    MULT_6   = 3'd5
  } mult_t;

  // Number of selected phases (2 x factor) for each multiplication factor.
  function automatic int unsigned mult_edges(mult_t m);
    case (m)
      MULT_0P5: return 1;
      MULT_1:   return 2;
      MULT_1P5: return 3;
      MULT_2:   return 4;
      MULT_3:   return 6;
      default:  return 12;
    endcase
  endfunction

  // Program vector for factor m and phase index ph (0 .. 12/edges-1).
  function automatic logic [N_PHASES-1:0] si_pattern(mult_t m, int unsigned ph);
    logic [N_PHASES-1:0] s;
    int unsigned n, step;
    n    = mult_edges(m);
    step = N_PHASES / n;
    s    = '0;
    for (int unsigned k = 0; k < n; k++) s[(ph + k * step) % N_PHASES] = 1'b1;
    return s;
  endfunction
endpackage
