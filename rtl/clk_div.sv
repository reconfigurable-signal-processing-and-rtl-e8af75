// clk_div: configurable clock divider of the DSP.
//
// The DSP is described with divided clocks f_Clk/n, /2n, /4n, /8n and
// f_Clk/k derived from the master clock.  Here every module runs on the
// master clock and a divided clock is a one-cycle enable strobe that fires
// once per period, which keeps the design in one clock domain.  A counter
// modulo n makes ce_n; a 3-bit counter of ce_n pulses makes ce_2n, ce_4n
// and ce_8n, so all four are aligned (ce_8n implies ce_4n implies ce_2n
// implies ce_n).  A separate counter modulo K makes ce_k; clk_shift
// chooses the count at which it fires (the "clock shift" operation
// parameter), and k_phase is the current count relative to that phase,
// i.e. which of the K time-interleaved slots the master cycle belongs to.
// A change of n_div takes effect when the running period ends.
module clk_div #(
  parameter int unsigned K = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [4:0]           n_div,
  input  logic [$clog2(K)-1:0] clk_shift,
  output logic                 ce_n,
  output logic                 ce_2n,
  output logic                 ce_4n,
  output logic                 ce_8n,
  output logic                 ce_k,
  output logic [$clog2(K)-1:0] k_phase
);

  localparam int unsigned KW = $clog2(K);

  logic [4:0]    ncnt;
  logic [2:0]    mcnt;
  logic [KW-1:0] kcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ncnt <= '0;
      mcnt <= '0;
      kcnt <= '0;
    end else begin
      ncnt <= (ncnt + 5'd1 >= n_div) ? 5'd0 : ncnt + 5'd1;
      if (ncnt == 5'd0) mcnt <= mcnt + 3'd1;
      kcnt <= (32'(kcnt) == K - 1) ? '0 : kcnt + 1'b1;
    end
  end

  always_comb begin
    ce_n    = (ncnt == 5'd0);
    ce_2n   = ce_n && (mcnt[0]   == 1'b0);
    ce_4n   = ce_n && (mcnt[1:0] == 2'b00);
    ce_8n   = ce_n && (mcnt      == 3'b000);
    ce_k    = (kcnt == clk_shift);
    k_phase = kcnt - clk_shift;
  end

endmodule
