// dac121s101_model: behavioural model of one DAC121S101 12-bit converter's
// serial input (not synthesizable). While sync_n is low, din is taken on each
// falling SCLK edge; on the 16th edge the 12 low bits become the output code
// and bits 13:12 the power-down mode. `frames` counts completed updates and
// `bad_frames` counts frames that ended (sync_n high) after other than 16 bits.
module dac121s101_model (
  input  logic        sync_n,
  input  logic        sclk,
  input  logic        din,
  output logic [11:0] vout,
  output logic [1:0]  pd,
  output int          frames,
  output int          bad_frames
);
  logic [15:0] sh;
  int          cnt;
  bit          active;
  initial begin
    sh = '0; cnt = 0; active = 0; vout = '0; pd = '0; frames = 0; bad_frames = 0;
  end
  always @(negedge sync_n) begin cnt = 0; active = 1; end
  always @(posedge sync_n) begin
    if (active && cnt != 16) bad_frames = bad_frames + 1;
    active = 0;
  end
  always @(negedge sclk) begin
    if (!sync_n) begin
      sh  = {sh[14:0], din};
      cnt = cnt + 1;
      if (cnt == 16) begin
        vout   = sh[11:0];
        pd     = sh[13:12];
        frames = frames + 1;
      end
    end
  end
endmodule
