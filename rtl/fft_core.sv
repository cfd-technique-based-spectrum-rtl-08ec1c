// fft_core: resource-shared N-point radix-2 FFT (N = 2048 by default) with its input
// register and output memory.
//
// Main idea: a radix-2 FFT of N points has log2(N) stages of N/2 butterflies each.
// Here only one stage is built, and of it only P butterfly computation units (BCUs,
// 64 by default) instead of N/2 (1024): the stage is reused log2(N) times and within
// each pass the P BCUs are reused CYC = N/(2P) times (16 by default).  To let one
// fixed wiring serve every stage, the transform is computed in constant-geometry
// (Pease) form of decimation in frequency: in every stage butterfly j reads words j
// and j + N/2 and writes words 2j and 2j+1, only the twiddle W_N^((j>>s)<<s) depends on
// the stage s.  BCU b handles butterflies j = c*P + b in cycles c = 0..CYC-1, so each
// BCU input is a CYC:1 (16:1) multiplexer over fixed register words.
//
// Storage is registers, no RAM: bank A is the serial-to-parallel input register
// (INP-REG, N words of 64 bits) and bank B a second register bank; stages alternate
// A->B and B->A.  After the last stage the transform sits in bit-reversed order in
// one bank, which acts as the output memory and is read out in natural bin order
// through a bit-reversed address.  Each stage halves the data (truncation unit), so
// the output is DFT(x)/N.
//
// Interface and timing: in PH_LOAD one sample per cycle is taken while in_valid and
// in_ready are high (N cycles when streaming).  Then the computation takes
// log2(N)*(CYC+1) cycles (187 by default), and the N bins come out on consecutive
// cycles with out_valid, out_k = bin number, out_last on bin N-1.  After that in_ready
// rises again.  The document gives the BCU count, the reuse over 11 stages, the 16:1
// multiplexers and the memoryless register storage; the constant-geometry ordering,
// the ping-pong banks and the read-out order are this design's reading.
module fft_core
  import cfd_pkg::*;
#(
  parameter int unsigned N = 2048,   // FFT points (power of two)
  parameter int unsigned P = 64,     // butterfly computation units (power of two, <= N/2)
  localparam int unsigned STAGES = $clog2(N),
  localparam int unsigned CYC    = N / (2 * P),
  localparam int unsigned AW     = $clog2(N),
  localparam int unsigned SW     = $clog2(STAGES),
  localparam int unsigned CW     = (CYC > 1) ? $clog2(CYC) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  cplx32_t       in_data,
  output logic          in_ready,
  output logic          out_valid,
  output logic [15:0]   out_k,      // bin number of out_data
  output logic          out_last,
  output cplx32_t       out_data,   // F(k) / N
  output logic          stage_done  // pulse per finished stage (monitoring)
);
  fft_phase_t    phase;
  logic [AW-1:0] load_addr, out_cnt;
  logic          rd_en, src_is_b, wr_en, wr_to_b, out_en, out_from_b;
  logic [SW-1:0] rd_stage;
  logic [CW-1:0] rd_cyc, wr_cyc;

  fft_ctrl #(.N(N), .P(P)) u_ctrl (
    .clk, .rst_n, .in_valid, .phase, .in_ready, .load_addr,
    .rd_en, .rd_stage, .rd_cyc, .src_is_b, .wr_en, .wr_cyc, .wr_to_b,
    .out_en, .out_cnt, .out_from_b, .stage_done
  );

  // register banks: A doubles as the input register, the last stage's bank as output
  // memory; each word is a register of its own (g_word below), seen here as an array
  cplx32_t bank_a [N];
  cplx32_t bank_b [N];

  cplx32_t y0 [P];
  cplx32_t y1 [P];

  for (genvar b = 0; b < int'(P); b++) begin : g_bcu
    cplx32_t cand_top [CYC];
    cplx32_t cand_bot [CYC];
    cplx32_t a_in, b_in;
    cplx16_t tw;

    // 16:1 input multiplexers over the fixed words this BCU can read
    always_comb begin
      for (int c = 0; c < int'(CYC); c++) begin
        cand_top[c] = src_is_b ? bank_b[c*P + b]       : bank_a[c*P + b];
        cand_bot[c] = src_is_b ? bank_b[c*P + b + N/2] : bank_a[c*P + b + N/2];
      end
      a_in = cand_top[rd_cyc];
      b_in = cand_bot[rd_cyc];
    end

    twiddle_lut #(.N(N), .P(P), .BCU_ID(b)) u_tw (
      .stage(rd_stage), .cyc(rd_cyc), .tw
    );

    bcu u_bcu (
      .clk, .load(rd_en), .a(a_in), .b(b_in), .tw, .y0(y0[b]), .y1(y1[b])
    );
  end

  // bank writes: word i is written by BCU (i/2) % P in cycle (i/2) / P of a stage,
  // with y0 for even i and y1 for odd i; bank A is also written by the input loader
  for (genvar i = 0; i < int'(N); i++) begin : g_word
    localparam int unsigned J  = i / 2;
    localparam int unsigned BI = J % P;      // writing BCU
    localparam int unsigned CI = J / P;      // cycle of the stage in which it writes
    cplx32_t res;
    logic    hit, load_hit;

    assign res      = (i % 2 == 0) ? y0[BI] : y1[BI];
    assign hit      = wr_en && (wr_cyc == CW'(CI));
    assign load_hit = in_ready && in_valid && (load_addr == AW'(i));

    // the word's two registers, one per bank
    cplx32_t a_q, b_q;

    always_ff @(posedge clk) begin
      if (load_hit)             a_q <= in_data;
      else if (hit && !wr_to_b) a_q <= res;
      if (hit && wr_to_b)       b_q <= res;
    end

    assign bank_a[i] = a_q;
    assign bank_b[i] = b_q;
  end

  // output memory read-out: bin k lives at word bitrev(k)
  logic [AW-1:0] rd_addr;
  assign rd_addr = AW'(bitrev(32'(out_cnt), AW));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_k     <= '0;
      out_last  <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= out_en;
      out_k     <= 16'(out_cnt);
      out_last  <= out_en && (out_cnt == AW'(N - 1));
      if (out_en) out_data <= out_from_b ? bank_b[rd_addr] : bank_a[rd_addr];
    end
  end

  // a stage must not start reading before the previous stage's last write
  // (controller contract: no read while a write of the opposite bank direction is pending)
  assert property (@(posedge clk) disable iff (!rst_n) (phase == PH_COMP && rd_en) |-> !(wr_en && (wr_to_b == src_is_b)))
    else $error("fft_core: stage read overlaps the previous stage's write");
endmodule
