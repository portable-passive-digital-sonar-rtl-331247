// adc_ctrl: controller for AD7476 12-bit serial ADCs (Digilent Pmod AD1).
//
// All converters share one serial clock (sclk) and one active-low chip select
// (cs_n); each returns its result on its own sdata line, as in the document's
// multi-channel controller. A conversion starts with a one-cycle start pulse
// while the controller is idle: cs_n falls, then 16 sclk periods follow. The
// AD7476 sends four leading zeros and then the 12-bit result MSB first, giving
// one bit with the falling edge of cs_n and each following bit after a falling
// edge of sclk. The controller samples every sdata line in the system-clock
// cycle in which it drives sclk low, so it reads each bit just before the
// converter replaces it. After the 16th bit cs_n rises, the low 12 bits of every
// shift register go to data[], and done pulses for one cycle.
//
// The document gives this block's function (control signals, 12-bit unsigned
// results, a done flag) but takes its insides from the board vendor; the
// sequence above follows the converter's serial protocol, and the sclk rate
// (system clock / (2*SCLK_HALF)) is this design's choice: 12.5 MHz from a
// 50 MHz clock, within the converter's 20 MHz limit. done goes high
// 32*SCLK_HALF+1 cycles after the clock edge that accepts start (65 cycles by
// default), well inside the 100-cycle sample period. start is ignored while
// busy.
module adc_ctrl #(
  parameter int N_CH      = 3,
  parameter int SAMPLE_W  = 12,
  parameter int SCLK_HALF = 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic [N_CH-1:0]     sdata,
  output logic                sclk,
  output logic                cs_n,
  output logic [SAMPLE_W-1:0] data [N_CH],
  output logic                done,
  output logic                busy
);
  localparam int NBITS = 16;
  localparam int HW    = $clog2(SCLK_HALF + 1);

  typedef enum logic [1:0] {IDLE, SHIFT, FINISH} state_t;
  state_t          state;
  logic [HW-1:0]   half_cnt;
  logic [4:0]      bit_cnt;
  logic [NBITS-1:0] shreg [N_CH];

  assign busy = (state != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      sclk     <= 1'b1;
      cs_n     <= 1'b1;
      done     <= 1'b0;
      half_cnt <= '0;
      bit_cnt  <= '0;
      for (int c = 0; c < N_CH; c++) begin
        shreg[c] <= '0;
        data[c]  <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          sclk <= 1'b1;
          if (start) begin
            cs_n     <= 1'b0;
            half_cnt <= '0;
            bit_cnt  <= '0;
            state    <= SHIFT;
          end
        end
        SHIFT: begin
          if (half_cnt == HW'(SCLK_HALF - 1)) begin
            half_cnt <= '0;
            if (sclk) begin
              // falling edge of sclk: take the bit the ADC is presenting now
              sclk <= 1'b0;
              for (int c = 0; c < N_CH; c++)
                shreg[c] <= {shreg[c][NBITS-2:0], sdata[c]};
              bit_cnt <= bit_cnt + 1'b1;
            end else begin
              sclk <= 1'b1;
              if (bit_cnt == 5'(NBITS)) state <= FINISH;
            end
          end else begin
            half_cnt <= half_cnt + 1'b1;
          end
        end
        FINISH: begin
          cs_n <= 1'b1;
          done <= 1'b1;
          for (int c = 0; c < N_CH; c++)
            data[c] <= shreg[c][SAMPLE_W-1:0];
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
