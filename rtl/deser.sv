// deser: interpolator output multiplexer and configurable deserializer.
//
// The interpolation factor is chosen by taking the output of HBF1 (x2),
// HBF2 (x4), HBF3 (x8) or the CIC (x8n).  The CIC already delivers K
// samples per f_Clk/k period.  A half-band output is a serial stream, so
// a chain of K-1 registers collects K consecutive samples of the selected
// stream into one K-lane word, which is the form the K time-interleaved
// SCS cores take.
//
// Interface: hN is the output register of stage N and sN its output-rate
// strobe (ce_4n, ce_2n, ce_n); a stage's sample is taken at its strobe.
// cic_y is taken at ce_k.  lanes/valid change only at ce_k and hold for
// one f_Clk/k period; lanes[0] is the oldest sample.  With a half-band
// tap a word is issued at the first ce_k after it is complete, so the
// stream arrives at less than one word per period and valid marks the
// periods that carry a word.  A change of sel takes effect at once; the
// first word after it may mix samples of the two taps.
module deser
  import dsp_pkg::*;
#(
  parameter int unsigned K = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  isel_t sel,
  input  iq_t   h1,
  input  logic  s1,
  input  iq_t   h2,
  input  logic  s2,
  input  iq_t   h3,
  input  logic  s3,
  input  iq_t   cic_y [K],
  input  logic  ce_k,
  output iq_t   lanes [K],
  output logic  valid
);

  localparam int unsigned CW = $clog2(K);

  iq_t           sx;      // selected serial sample
  logic          ss;      // its strobe
  iq_t           sr   [K-1];
  iq_t           word [K];
  logic [CW-1:0] cnt;
  logic          pend;
  logic          done;

  always_comb begin
    unique case (sel)
      SEL_HBF1: begin sx = h1; ss = s1; end
      SEL_HBF2: begin sx = h2; ss = s2; end
      SEL_HBF3: begin sx = h3; ss = s3; end
      default:  begin sx = h3; ss = 1'b0; end
    endcase
    done = ss && (32'(cnt) == K - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      pend <= 1'b0;
      for (int j = 0; j < K-1; j++) sr[j] <= '0;
      for (int j = 0; j < K; j++) begin
        word[j]  <= '0;
        lanes[j] <= '0;
      end
      valid <= 1'b0;
    end else begin
      if (ss) begin
        sr[0] <= sx;
        for (int j = 1; j < K-1; j++) sr[j] <= sr[j-1];
        cnt <= (32'(cnt) == K - 1) ? '0 : cnt + 1'b1;
      end
      if (done) begin
        word[K-1] <= sx;
        for (int j = 0; j < K-1; j++) word[j] <= sr[K-2-j];
      end
      if (ce_k) begin
        if (sel == SEL_CIC) begin
          lanes <= cic_y;
          valid <= 1'b1;
          pend  <= 1'b0;
        end else begin
          lanes <= word;
          valid <= pend;
          pend  <= done;
        end
      end else if (done) begin
        pend <= 1'b1;
      end
    end
  end

endmodule
