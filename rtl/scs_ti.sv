// scs_ti: K time-interleaved signal component separators and output mux.
//
// One SCS core cannot run at the full output rate f_Clk, so K copies run
// side by side on the f_Clk/k strobe, core j handling lane j (sample
// Kn-K+1+j) of each K-lane word.  The cores advance together, so their
// results for a word are ready at the same time.  A multiplexer on the
// master clock then sends the K results out one per cycle: at ce_k it
// emits lane 0 and keeps lanes 1..K-1 in a holding register, and in slot j
// of the period (k_phase = j) it emits lane j.  The output is therefore a
// continuous stream of one sample per master cycle when every word is
// valid, in the original sample order.
//
// Interface: lanes/in_valid must hold for the f_Clk/k period in which
// they are taken at ce_k.  out/out_valid change every master cycle.
// Latency: LAT core steps (see scs_core) plus one period for the hand-over.
// K, the per-slot cores and the output multiplexer follow the source.
module scs_ti
  import dsp_pkg::*;
#(
  parameter int unsigned K        = 4,
  parameter int unsigned SCS_TYPE = 3,
  parameter int unsigned OUT_RES  = 7,
  parameter int unsigned AMAX     = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ce_k,
  input  logic [$clog2(K)-1:0] k_phase,
  input  mod_t                 mode,
  input  logic                 in_valid,
  input  iq_t                  lanes [K],
  output logic                 out_valid,
  output scs_out_t             out
);

  scs_out_t core_out [K];
  logic     core_v   [K];
  scs_out_t hold     [K];
  logic     hold_v;

  for (genvar j = 0; j < K; j++) begin : g_core
    scs_core #(.SCS_TYPE(SCS_TYPE), .OUT_RES(OUT_RES), .AMAX(AMAX)) u_core (
      .clk, .rst_n, .en(ce_k), .mode, .in_valid, .in(lanes[j]),
      .out_valid(core_v[j]), .out(core_out[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < K; j++) hold[j] <= '0;
      hold_v    <= 1'b0;
      out       <= '0;
      out_valid <= 1'b0;
    end else if (ce_k) begin
      hold      <= core_out;
      hold_v    <= core_v[0];
      out       <= core_out[0];
      out_valid <= core_v[0];
    end else begin
      out       <= hold[k_phase];
      out_valid <= hold_v;
    end
  end

endmodule
