// srs_state_machine: sequences the SRS through the Mu2e delivery cycle.
//
// A cycle is started by the timing event that announces it (cycle_start).
// The machine then runs SPILLS reset/spill pairs, counting turn ticks: a reset
// period of RESET_TURNS (5 ms) in which the quads ramp to near resonance,
// then a spill of SPILL_TURNS (43.1 ms) in which the loops regulate. After the
// last spill it returns to NO_BEAM (the 1.02 s without beam) until the next
// cycle_start. A cycle_start while a cycle runs is ignored.
//
// During a spill the turns are grouped into bins of TURNS_PER_BIN. bin_strobe
// is a one-clock pulse after the last turn of each bin (including the partial
// last bin of the spill); bin_idx still holds the index of the finished bin in
// that clock and advances one clock later. spill_start pulses in the first
// clock of a spill, spill_end together with the last bin_strobe and cycle_done
// when the last spill of the cycle ends. Placing the 5 ms reset before each
// spill (so that the cycle event arrives 5 ms before the first injection) and
// the bin grouping are this design's choices.
module srs_state_machine
  import srs_pkg::*;
#(
  parameter int unsigned SPILLS        = SPILLS_PER_CYCLE,
  parameter int unsigned RESET_T       = RESET_TURNS,
  parameter int unsigned SPILL_T       = SPILL_TURNS,
  parameter int unsigned TPB           = TURNS_PER_BIN,
  parameter int unsigned NBINS         = BINS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        enable,
  input  logic                        cycle_start,
  input  logic                        turn_tick,
  output srs_state_t                  state,
  output logic [$clog2(SPILLS)-1:0]   spill_idx,
  output logic [15:0]                 period_turn,  // turn within the current reset or spill
  output logic [$clog2(NBINS)-1:0]    bin_idx,
  output logic                        bin_strobe,
  output logic                        spill_start,
  output logic                        spill_end,
  output logic                        cycle_done
);
  localparam int unsigned TW = $clog2(TPB);

  logic [TW-1:0] turn_in_bin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_NO_BEAM;
      spill_idx   <= '0;
      period_turn <= '0;
      bin_idx     <= '0;
      turn_in_bin <= '0;
      bin_strobe  <= 1'b0;
      spill_start <= 1'b0;
      spill_end   <= 1'b0;
      cycle_done  <= 1'b0;
    end else begin
      bin_strobe  <= 1'b0;
      spill_start <= 1'b0;
      spill_end   <= 1'b0;
      cycle_done  <= 1'b0;
      if (bin_strobe) bin_idx <= bin_idx + 1'b1;
      unique case (state)
        ST_NO_BEAM: begin
          if (enable && cycle_start) begin
            state       <= ST_RESET;
            spill_idx   <= '0;
            period_turn <= '0;
          end
        end
        ST_RESET: begin
          if (!enable) state <= ST_NO_BEAM;
          else if (turn_tick) begin
            if (period_turn == 16'(RESET_T - 1)) begin
              state       <= ST_SPILL;
              period_turn <= '0;
              bin_idx     <= '0;
              turn_in_bin <= '0;
              spill_start <= 1'b1;
            end else begin
              period_turn <= period_turn + 1'b1;
            end
          end
        end
        ST_SPILL: begin
          if (!enable) state <= ST_NO_BEAM;
          else if (turn_tick) begin
            turn_in_bin <= turn_in_bin + 1'b1;
            if (turn_in_bin == TW'(TPB - 1)) begin
              bin_strobe  <= 1'b1;
              turn_in_bin <= '0;
            end
            if (period_turn == 16'(SPILL_T - 1)) begin
              bin_strobe  <= 1'b1;
              spill_end   <= 1'b1;
              period_turn <= '0;
              if (spill_idx == ($bits(spill_idx))'(SPILLS - 1)) begin
                state      <= ST_NO_BEAM;
                cycle_done <= 1'b1;
              end else begin
                state     <= ST_RESET;
                spill_idx <= spill_idx + 1'b1;
              end
            end else begin
              period_turn <= period_turn + 1'b1;
            end
          end
        end
        default: state <= ST_NO_BEAM;
      endcase
    end
  end
endmodule
