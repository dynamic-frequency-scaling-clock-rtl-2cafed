// dcd_sequencer: control sequence of the digital charge-detecting (DCD)
// controller. Synthesizable, clocked by the rising edge of REFCLK.
//
// Locking takes a fixed ten REFCLK cycles, as in the source design:
//   edge 1      opens the two coarse CDLs (they measure the REFCLK high time)
//   edge 2      stores C1,C2 and turns them into the coarse stage
//               (11 -> stage 1, 01 -> stage 2, 00 -> stage 3), arms the phase
//               detector and opens fine CDL 0 (weight 40)
//   edges 3..9  open fine CDLs 1..7 in turn (weights 30,20,10,5,3,2,1),
//               one per cycle; each CDL itself keeps its decision
//   edge 10     closes the last CDL, disarms the detector, raises locked
// The coarse map is the source design's; the code 10 cannot happen (the C1
// line charges more easily than the C2 line) and is mapped to stage 2 here.
// Before lock the stage is 1. rst_n is active low and asynchronous; a new
// lock needs a reset. sel_t2 picks the second trigger tap of the phase
// blenders when the reference is slow (C1,C2 = 00).
module dcd_sequencer
  import dfs_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  c1,
  input  logic                  c2,
  output logic                  en_coarse,
  output logic [N_FINE_CDL-1:0] en_fine,
  output logic                  pd_en,
  output coarse_stage_t         stage,
  output logic                  sel_t2,
  output logic                  locked
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [3:0] cnt;   // REFCLK edges seen since reset, saturates at LOCK_CYCLES

  function automatic coarse_stage_t stage_of(logic a, logic b);
    case ({a, b})
      2'b11:   return STAGE_1;
      2'b00:   return STAGE_3;
      default: return STAGE_2;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      en_coarse <= 1'b0;
      en_fine   <= '0;
      pd_en     <= 1'b0;
      stage     <= STAGE_1;
      sel_t2    <= 1'b0;
      locked    <= 1'b0;
    end else if (cnt < 4'(LOCK_CYCLES)) begin
      cnt       <= cnt + 4'd1;
      en_coarse <= (cnt == 4'd0);
      if (cnt == 4'd1) begin
        stage  <= stage_of(c1, c2);
        sel_t2 <= ~c1 & ~c2;
      end
      pd_en   <= (cnt >= 4'd1) && (cnt <= 4'(N_FINE_CDL));
      en_fine <= '0;
      if (cnt >= 4'd1 && cnt <= 4'(N_FINE_CDL)) en_fine[3'(cnt - 4'd1)] <= 1'b1;
      locked  <= (cnt == 4'(LOCK_CYCLES - 1));
    end
  end

  // one line open at a time
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({en_coarse, en_fine}));
endmodule
