// turn_marker_counter: counts Delivery Ring turn markers.
//
// The turn marker from the Muon Campus timing system is aligned with bucket 0
// of the DR; counting it keeps the SRS in step with the accelerator timeline.
// The marker input is a level of any width: its rising edge, after a two-flop
// synchroniser, gives a one-cycle turn_tick. cycle_turns counts ticks since the
// last cycle_start. If no marker arrives for MAX_GAP clocks (the LLRF turned
// off during RF manipulations) marker_lost is raised until the next marker.
// The synchroniser, the gap watchdog and the counter width are this design's
// choices. Latency: turn_tick follows the marker's rising edge by 3 clocks.
module turn_marker_counter #(
  parameter int unsigned CNT_W   = 24,
  parameter int unsigned MAX_GAP = 256   // about 2.3 turns at 66 MHz (111.9 clocks per turn)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             turn_marker,   // asynchronous marker from the timing system
  input  logic             cycle_start,   // clears the count
  output logic             turn_tick,     // one clock per turn
  output logic [CNT_W-1:0] cycle_turns,   // turns since cycle_start
  output logic             marker_lost
);
  logic [2:0] sync;
  logic [$clog2(MAX_GAP+1)-1:0] gap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync        <= '0;
      turn_tick   <= 1'b0;
      cycle_turns <= '0;
      gap         <= '0;
      marker_lost <= 1'b0;
    end else begin
      sync      <= {sync[1:0], turn_marker};
      turn_tick <= sync[1] & ~sync[2];
      if (cycle_start)    cycle_turns <= '0;
      else if (turn_tick) cycle_turns <= cycle_turns + 1'b1;
      if (turn_tick) begin
        gap         <= '0;
        marker_lost <= 1'b0;
      end else if (gap == MAX_GAP[$bits(gap)-1:0]) begin
        marker_lost <= 1'b1;
      end else begin
        gap <= gap + 1'b1;
      end
    end
  end
endmodule
