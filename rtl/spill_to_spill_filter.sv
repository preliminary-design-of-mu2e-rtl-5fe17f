// spill_to_spill_filter: learns a correction profile from spill to spill and
// plays it back with phase correction.
//
// The spill is divided into bins. For every bin k the filter keeps a word
// M[k] (with 8 fraction bits) in a RAM. At the end of bin k (bin_strobe, with
// the error of that bin) and with learn set, it updates
//   M[k] <- M[k] - M[k] >>> leak_shift + (err << 8) >>> gain_shift
// (no forgetting term when leak_shift is 0): an integrator across spills,
// i.e. a first-order filter of the bin's error history. It then outputs the
// correction for the coming bin k+1 read phase_adv bins ahead, M[k+1+phase_adv]
// (clamped to the last bin), which compensates the delay of the loop. At
// spill_start it outputs M[phase_adv] for bin 0. corr changes 6 clocks after
// bin_strobe and 3 after spill_start. clear (and reset) zero the RAM in
// NBINS clocks, during which busy is high and strobes are ignored. The update
// rule, the forgetting term and the fixed-point format are this design's
// choices.
module spill_to_spill_filter
  import srs_pkg::*;
#(
  parameter int unsigned NBINS = BINS,
  parameter int unsigned MW    = 24
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     spill_start,
  input  logic                     bin_strobe,
  input  logic [$clog2(NBINS)-1:0] bin_idx,
  input  sample_t                  err,
  input  logic                     learn,
  input  s2s_cfg_t                 cfg,
  output sample_t                  corr,
  output logic                     busy
);
  localparam int unsigned AW = $clog2(NBINS);
  localparam logic signed [MW:0] MMAX = (MW+1)'((2 ** (MW - 1)) - 1);
  localparam logic signed [MW:0] MMIN = -(MW+1)'(2 ** (MW - 1));

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_RD_K, S_WR_K, S_HOLD, S_RD_NEXT, S_OUT} s2s_state_t;
  s2s_state_t st;

  logic signed [MW-1:0] mem [NBINS];
  logic signed [MW-1:0] rdata;
  logic [AW-1:0]        raddr, waddr, k;
  logic signed [MW-1:0] wdata;
  logic                 we;
  sample_t              e_k;
  logic                 learn_k;
  logic signed [MW:0]   upd;
  logic [AW:0]          ahead;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

  function automatic logic [AW-1:0] clamp_addr(input logic [AW:0] a);
    return (a > (AW+1)'(NBINS - 1)) ? AW'(NBINS - 1) : a[AW-1:0];
  endfunction

  always_comb begin
    upd = (MW+1)'(rdata) + (((MW+1)'(e_k) <<< 8) >>> cfg.gain_shift);
    if (cfg.leak_shift != '0) upd = upd - ((MW+1)'(rdata) >>> cfg.leak_shift);
    ahead = (AW+1)'(k) + 1'b1 + (AW+1)'(cfg.phase_adv);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_CLEAR;
      raddr   <= '0;
      waddr   <= '0;
      wdata   <= '0;
      we      <= 1'b0;
      k       <= '0;
      e_k     <= '0;
      learn_k <= 1'b0;
      corr    <= '0;
    end else begin
      we <= 1'b0;
      if (clear && st != S_CLEAR) begin
        st    <= S_CLEAR;
        waddr <= '0;
        wdata <= '0;
        we    <= 1'b1;
        corr  <= '0;
      end else begin
        unique case (st)
          S_CLEAR: begin
            we    <= 1'b1;
            wdata <= '0;
            if (we) waddr <= waddr + 1'b1;
            if (we && waddr == AW'(NBINS - 1)) begin
              we <= 1'b0;
              st <= S_IDLE;
            end
          end
          S_IDLE: begin
            if (bin_strobe) begin
              k       <= bin_idx;
              e_k     <= err;
              learn_k <= learn;
              raddr   <= bin_idx;
              st      <= S_RD_K;
            end else if (spill_start) begin
              raddr <= clamp_addr((AW+1)'(cfg.phase_adv));
              st    <= S_RD_NEXT;
            end
          end
          S_RD_K: st <= S_WR_K;   // rdata <= M[k] this clock
          S_WR_K: begin
            if (learn_k) begin
              we    <= 1'b1;
              waddr <= k;
              if (upd > MMAX)      wdata <= MMAX[MW-1:0];
              else if (upd < MMIN) wdata <= MMIN[MW-1:0];
              else                 wdata <= upd[MW-1:0];
            end
            raddr <= clamp_addr(ahead);
            st    <= S_HOLD;
          end
          S_HOLD:    st <= S_RD_NEXT;  // the write lands; ahead may equal k at the last bin
          S_RD_NEXT: st <= S_OUT;      // rdata <= M[ahead]
          S_OUT: begin
            corr <= sat16(48'(rdata >>> 8));
            st   <= S_IDLE;
          end
          default: st <= S_IDLE;
        endcase
      end
    end
  end

  always_comb busy = (st == S_CLEAR);
endmodule
