// daq_sampler: raw-data capture of two ADC channels at the full sample rate,
// packed into a stream for a scatter-gather DMA engine.
//
// The host picks two of the CH ADC channels (sel_a, sel_b), a length in
// sample pairs and whether the capture waits for the next spill start. A
// pulse on arm starts the capture (or arms it); from then on every ADC sample
// period emits one 32-bit word {sample[sel_b], sample[sel_a]} on an
// Avalon-ST style source (st_valid/st_ready/st_data). st_last marks the
// final word, and done is set when it has been sent. The capture does not
// stall the ADC: if the previous word still waits when a new pair arrives,
// the new pair is dropped, counted and overflow is set (sticky until the
// next arm); if the dropped pair was the final one, the waiting word becomes
// the last. count is the number of sample periods taken so far. stop stops
// a capture. The DMA engine and the memory behind it are outside this module.
// That two signals are sampled at full speed into memory follows the
// document; the stream format, the trigger choice and the drop-on-backpressure
// policy are this design's choices.
module daq_sampler #(
  parameter int unsigned CH = 16,
  parameter int unsigned W  = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [W-1:0]   sample [CH],
  input  logic                  sample_valid,
  input  logic [$clog2(CH)-1:0] sel_a,
  input  logic [$clog2(CH)-1:0] sel_b,
  input  logic [31:0]           length,
  input  logic                  on_spill,
  input  logic                  spill_start,
  input  logic                  arm,
  input  logic                  stop,
  output logic [2*W-1:0]        st_data,
  output logic                  st_valid,
  output logic                  st_last,
  input  logic                  st_ready,
  output logic                  busy,
  output logic                  waiting,
  output logic                  done,
  output logic                  overflow,
  output logic [31:0]           count
);
  typedef enum logic [1:0] {D_IDLE, D_WAIT, D_RUN} dstate_t;
  dstate_t st;

  assign busy    = (st == D_RUN);
  assign waiting = (st == D_WAIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= D_IDLE;
      st_data  <= '0;
      st_valid <= 1'b0;
      st_last  <= 1'b0;
      done     <= 1'b0;
      overflow <= 1'b0;
      count    <= '0;
    end else begin
      if (st_valid && st_ready) begin
        st_valid <= 1'b0;
        st_last  <= 1'b0;
        if (st_last) done <= 1'b1;
      end
      if (stop) begin
        st <= D_IDLE;
      end else if (arm) begin
        done     <= 1'b0;
        overflow <= 1'b0;
        count    <= '0;
        st       <= (length == 0) ? D_IDLE : (on_spill ? D_WAIT : D_RUN);
      end else begin
        unique case (st)
          D_WAIT: if (spill_start) st <= D_RUN;
          D_RUN: if (sample_valid) begin
            count <= count + 1'b1;
            if (!st_valid || st_ready) begin
              st_data  <= {sample[sel_b], sample[sel_a]};
              st_valid <= 1'b1;
              st_last  <= (count == length - 1);
            end else begin
              overflow <= 1'b1;
              if (count == length - 1) st_last <= 1'b1;
            end
            if (count == length - 1) st <= D_IDLE;
          end
          default: ;
        endcase
      end
    end
  end
endmodule
