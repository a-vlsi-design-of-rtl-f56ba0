// sdm_dac: digital part of the 1-bit DAC. The 1X audio data coming back
// from the CD-ROM decoder (16-bit two's complement PCM, one channel) is
// turned into a 1-bit stream by a second-order delta-sigma modulator that
// runs once per os_en strobe; the pulse density of dac_out follows the
// sample value (all zeros at -32768, all ones near +32767). The analog
// low-pass filter that turns the stream into the audio voltage is outside
// this module. The document only names the 1-bit DAC; the modulator order
// and structure (two cascaded integrators, 1-bit quantiser fed back to both)
// are this design's choices.
module sdm_dac (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pcm_valid,
  input  logic [15:0] pcm,
  input  logic        os_en,
  output logic        dac_out
);
  logic signed [15:0] x;
  logic signed [23:0] i1, i2;
  logic signed [23:0] fb;

  assign fb = dac_out ? 24'sd32768 : -24'sd32768;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x       <= '0;
      i1      <= '0;
      i2      <= '0;
      dac_out <= 1'b0;
    end else begin
      if (pcm_valid) x <= signed'(pcm);
      if (os_en) begin
        logic signed [23:0] n1, n2;
        n1 = i1 + 24'(x) - fb;
        n2 = i2 + n1 - fb;
        i1 <= n1;
        i2 <= n2;
        dac_out <= (n2 >= 0);
      end
    end
  end
endmodule
