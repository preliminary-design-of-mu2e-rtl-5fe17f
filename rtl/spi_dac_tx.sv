// spi_dac_tx: SPI transmitter for the carrier board's four slow 16-bit DACs
// (200 kSPS, SPI clock up to 25 MHz).
//
// The transmitter sends the four channel values in turn, continuously, each
// as one 24-bit frame while cs_n is low, most significant bit first:
//   {CMD (4 bits), 2'b00, channel (2 bits), value (16 bits)}
// sclk idles low and toggles every CLK_DIV clocks, so f_sclk = f_clk /
// (2*CLK_DIV): 16.5 MHz from a 66 MHz clock. mosi changes after each falling
// edge and is stable at the rising edge, where the DAC samples it; cs_n goes
// high for GAP clocks between frames. A channel value is captured when its
// frame starts; frame_done pulses at the end of each frame. With CLK_DIV = 2
// and GAP = 4 a frame takes 101 clocks (1.53 us at 66 MHz), so each of the
// four channels is refreshed at about 163 kHz, within the DACs' 200 kSPS. The frame layout and the command code are
// this design's choices.
module spi_dac_tx #(
  parameter int unsigned N_CH    = 4,
  parameter int unsigned CLK_DIV = 2,
  parameter int unsigned GAP     = 4,
  parameter logic [3:0]  CMD     = 4'h3   // write and update the addressed channel
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [15:0] value [N_CH],
  output logic        sclk,
  output logic        mosi,
  output logic        cs_n,
  output logic        frame_done
);
  localparam int unsigned CHW = (N_CH > 1) ? $clog2(N_CH) : 1;

  typedef enum logic [1:0] {T_IDLE, T_SHIFT, T_GAP} tx_state_t;
  tx_state_t st;

  logic [23:0]                    shreg;
  logic [4:0]                     nbit;
  logic [CHW-1:0]                 ch;
  logic [$clog2(CLK_DIV+GAP+1)-1:0] div;

  always_comb mosi = shreg[23];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= T_IDLE;
      shreg      <= '0;
      nbit       <= '0;
      ch         <= '0;
      div        <= '0;
      sclk       <= 1'b0;
      cs_n       <= 1'b1;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      unique case (st)
        T_IDLE: begin
          if (enable) begin
            shreg <= {CMD, 2'b00, 2'(ch), value[ch]};
            cs_n  <= 1'b0;
            nbit  <= '0;
            div   <= '0;
            st    <= T_SHIFT;
          end
        end
        T_SHIFT: begin
          if (div == ($bits(div))'(CLK_DIV - 1)) begin
            div  <= '0;
            sclk <= ~sclk;
            if (sclk) begin                // falling edge
              if (nbit == 5'd23) begin
                cs_n       <= 1'b1;
                frame_done <= 1'b1;
                ch         <= (ch == CHW'(N_CH - 1)) ? '0 : ch + 1'b1;
                st         <= T_GAP;
              end else begin
                nbit  <= nbit + 1'b1;
                shreg <= {shreg[22:0], 1'b0};
              end
            end
          end else begin
            div <= div + 1'b1;
          end
        end
        T_GAP: begin
          if (div == ($bits(div))'(GAP - 1)) begin
            div <= '0;
            st  <= T_IDLE;
          end else begin
            div <= div + 1'b1;
          end
        end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
