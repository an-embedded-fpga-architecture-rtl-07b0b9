// pmod_ad1_ctrl: controller for one Digilent PMOD AD1 (two AD7476A 12-bit
// converters sharing chip select and serial clock, one data line each).
//
// While `en` is high a conversion frame is started every SAMPLE_DIV clocks
// (1052 clocks at 100 MHz = 95.06 kHz, the document's 95.1 kHz sampling rate).
// A frame pulls cs_n low and gives 16 SCLK periods of 2*SCLK_HALF clocks each.
// SCLK idles high; the converter moves to its next bit on each falling edge,
// so the controller takes each bit from sdata in the clock cycle that drives
// SCLK low. The 16-bit word holds four leading zeros and then the 12-bit result
// MSB first (AD7476A data-sheet framing; the document says only "SPI-like").
// After the last bit cs_n returns high, `sample` holds both results and `done`
// pulses for one clock. A frame lasts 1 + 16*2*SCLK_HALF + SCLK_HALF clocks.
// The sampling rate follows the document; SCLK rate and framing are choices
// of this design.
module pmod_ad1_ctrl
  import mpc_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV = 1052,  // clocks per sample (95.1 kHz)
  parameter int unsigned SCLK_HALF  = 3      // clocks per SCLK half period
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  output logic       cs_n,
  output logic       sclk,
  input  logic [1:0] sdata,
  output code_t      sample [2],
  output logic       done
);

  localparam int unsigned FRAME_CLKS = 1 + 32 * SCLK_HALF + SCLK_HALF;

  localparam int unsigned DW = $clog2(SAMPLE_DIV);
  localparam int unsigned HW = $clog2(SCLK_HALF + 1);
  logic [DW-1:0] div_cnt;
  logic [HW-1:0] half_cnt;
  logic [4:0]  bit_cnt;
  logic        busy;
  logic [15:0] shreg [2];

  always_ff @(posedge clk) begin
    if (rst || !en) div_cnt <= '0;
    else if (div_cnt == DW'(SAMPLE_DIV - 1)) div_cnt <= '0;
    else div_cnt <= div_cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cs_n      <= 1'b1;
      sclk      <= 1'b1;
      busy      <= 1'b0;
      done      <= 1'b0;
      half_cnt  <= '0;
      bit_cnt   <= '0;
      shreg[0]  <= '0;
      shreg[1]  <= '0;
      sample[0] <= '0;
      sample[1] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (en && div_cnt == '0) begin
          busy     <= 1'b1;
          cs_n     <= 1'b0;
          half_cnt <= '0;
          bit_cnt  <= '0;
        end
      end else if (half_cnt == HW'(SCLK_HALF - 1)) begin
        half_cnt <= '0;
        if (sclk) begin
          if (bit_cnt == 5'd16) begin
            // all 16 bits taken: end the frame
            cs_n      <= 1'b1;
            busy      <= 1'b0;
            done      <= 1'b1;
            sample[0] <= shreg[0][ADC_W-1:0];
            sample[1] <= shreg[1][ADC_W-1:0];
          end else begin
            sclk     <= 1'b0;
            shreg[0] <= {shreg[0][14:0], sdata[0]};
            shreg[1] <= {shreg[1][14:0], sdata[1]};
            bit_cnt  <= bit_cnt + 1'b1;
          end
        end else begin
          sclk <= 1'b1;
        end
      end else begin
        half_cnt <= half_cnt + 1'b1;
      end
    end
  end

  // A frame must end before the next sampling instant.
  initial assert (SAMPLE_DIV > FRAME_CLKS)
    else $error("SAMPLE_DIV too small for one conversion frame");

  // cs_n may only rise while SCLK is high.
  assert property (@(posedge clk) disable iff (rst) $rose(cs_n) |-> sclk);

endmodule
