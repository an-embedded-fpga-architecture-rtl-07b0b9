// pmod_da2_ctrl: controller for one Digilent PMOD DA2 (two DAC121S101 12-bit
// converters sharing SYNC and SCLK, one data line each).
//
// A one-clock `dac_enable` pulse from the master FSM latches both 12-bit codes
// and starts a 16-bit frame: SYNC goes low, SCLK runs for 16 periods of
// 2*SCLK_HALF clocks (idle high), the data lines change on rising SCLK edges
// and the converters take them on falling edges. The word is two don't-care
// zeros, power-down bits 00 (normal operation) and the code MSB first, per the
// DAC121S101 data sheet. After the 16th falling edge SCLK returns high, SYNC
// rises (the converters update their outputs) and `done` pulses. A frame takes
// 1 + 32*SCLK_HALF clocks from the enable. `dac_enable` while busy is ignored.
// The enable handshake follows the document; the serial timing is this
// design's choice within the data sheet's 30 MHz limit.
module pmod_da2_ctrl
  import mpc_pkg::*;
#(
  parameter int unsigned SCLK_HALF = 2  // 25 MHz SCLK from a 100 MHz clock
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       dac_enable,
  input  code_t      code [2],
  output logic       sync_n,
  output logic       sclk,
  output logic [1:0] din,
  output logic       busy,
  output logic       done
);

  localparam int unsigned HW = $clog2(SCLK_HALF + 1);
  logic [HW-1:0] half_cnt;
  logic [4:0]  bit_cnt;
  logic [15:0] shreg [2];

  assign din = {shreg[1][15], shreg[0][15]};

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_n   <= 1'b1;
      sclk     <= 1'b1;
      busy     <= 1'b0;
      done     <= 1'b0;
      half_cnt <= '0;
      bit_cnt  <= '0;
      shreg[0] <= '0;
      shreg[1] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (dac_enable) begin
          busy     <= 1'b1;
          sync_n   <= 1'b0;
          half_cnt <= '0;
          bit_cnt  <= '0;
          shreg[0] <= {4'b0000, code[0]};
          shreg[1] <= {4'b0000, code[1]};
        end
      end else if (half_cnt == HW'(SCLK_HALF - 1)) begin
        half_cnt <= '0;
        if (sclk) begin
          sclk    <= 1'b0;              // converters take the bit here
          bit_cnt <= bit_cnt + 1'b1;
        end else begin
          sclk <= 1'b1;
          if (bit_cnt == 5'd16) begin
            sync_n <= 1'b1;
            busy   <= 1'b0;
            done   <= 1'b1;
          end else begin
            shreg[0] <= {shreg[0][14:0], 1'b0};
            shreg[1] <= {shreg[1][14:0], 1'b0};
          end
        end
      end else begin
        half_cnt <= half_cnt + 1'b1;
      end
    end
  end

  // SYNC only rises with SCLK high and after exactly 16 falling edges.
  assert property (@(posedge clk) disable iff (rst) $rose(sync_n) |-> (sclk && bit_cnt == 5'd16));

endmodule
