// twiddle_lut: twiddle-factor look-up table of one butterfly computation unit (BCU).
//
// In the shared-stage FFT every BCU is reused for all log2(N) stages, and within a
// stage for N/(2P) consecutive cycles, so it needs one twiddle factor per (stage,
// cycle) pair.  The document describes this as LUTs of pre-computed twiddle factors
// steered by an 11:1 (stage) and a 16:1 (cycle) multiplexer under 4-bit select lines
// from the controller; this module is that table and those two multiplexers.
//
// Contents: BCU number BCU_ID in cycle c of stage s works on butterfly
// j = c*P + BCU_ID of the constant-geometry radix-2 decimation-in-frequency FFT and
// needs W_N^k with k = (j >> s) << s.  The values are computed at elaboration from
// cos/sin (Q2.14); the indexing scheme is this design's reading of the document.
// Purely combinational: tw follows stage and cyc in the same cycle.
module twiddle_lut
  import cfd_pkg::*;
#(
  parameter int unsigned N      = 2048,  // FFT points
  parameter int unsigned P      = 64,    // butterfly units in the shared stage
  parameter int unsigned BCU_ID = 0,     // which BCU this table serves
  localparam int unsigned STAGES = $clog2(N),
  localparam int unsigned CYC    = N / (2 * P),
  localparam int unsigned SW     = $clog2(STAGES),
  localparam int unsigned CW     = (CYC > 1) ? $clog2(CYC) : 1
) (
  input  logic [SW-1:0] stage,  // 11:1 select: current stage
  input  logic [CW-1:0] cyc,    // 16:1 select: cycle within the stage
  output cplx16_t       tw
);
  typedef logic [STAGES-1:0][CYC-1:0][31:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int s = 0; s < int'(STAGES); s++) begin
      for (int c = 0; c < int'(CYC); c++) begin
        int j;
        j       = c * int'(P) + int'(BCU_ID);
        t[s][c] = twiddle((j >> s) << s, int'(N));
      end
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  // first level: one CYC:1 multiplexer per stage; second level: STAGES:1
  logic [STAGES-1:0][31:0] per_stage;

  always_comb begin
    for (int s = 0; s < int'(STAGES); s++) per_stage[s] = TABLE[s][cyc];
    tw = (int'(stage) < int'(STAGES)) ? cplx16_t'(per_stage[stage]) : cplx16_t'(per_stage[0]);
  end
endmodule
