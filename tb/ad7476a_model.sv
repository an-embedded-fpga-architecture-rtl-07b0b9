// ad7476a_model: behavioural model of one AD7476A 12-bit converter as seen on
// its serial interface (not synthesizable). The falling edge of cs_n samples
// the `code` input and puts the first of four leading zeros on sdata; every
// falling SCLK edge while selected moves to the next bit, so the 12-bit code
// follows MSB first. `frames` counts conversions.
module ad7476a_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic [11:0] code,
  output logic        sdata,
  output int          frames
);
  logic [15:0] sh;
  initial begin
    sh     = '0;
    sdata  = 1'b0;
    frames = 0;
  end
  always @(negedge cs_n) begin
    sh     = {4'b0000, code};
    sdata  = sh[15];
    frames = frames + 1;
  end
  always @(negedge sclk) begin
    if (!cs_n) begin
      sh    = {sh[14:0], 1'b0};
      sdata = sh[15];
    end
  end
endmodule
