// fft_ctrl: finite-state controller of the resource-shared FFT.
//
// One physical stage of P butterfly units replaces all log2(N) stages of a radix-2
// FFT.  The controller sequences three phases:
//   PH_LOAD  the serial-to-parallel input register takes one sample per accepted
//            in_valid, at address load_addr, until N samples are held;
//   PH_COMP  for each stage s = 0 .. log2(N)-1, CYC = N/(2P) read cycles select, through
//            the 16:1 input multiplexers, which butterflies the BCUs take (rd_cyc) and
//            which twiddles they use (rd_stage, rd_cyc).  The BCU results are written
//            one cycle later (wr_en, wr_cyc).  A stage therefore takes CYC+1 cycles: the
//            extra cycle lets the last write land before the next stage reads;
//   PH_OUT   N read-out cycles, out_cnt = 0 .. N-1, one FFT bin per cycle.
// Stage s reads bank A and writes bank B when s is even, the other way when s is odd
// (src_is_b).  The document names a finite-state control unit with 4-bit select lines
// for the 11:1 and 16:1 multiplexers; the phase structure and the drain cycle are
// this design's choices.
module fft_ctrl
  import cfd_pkg::*;
#(
  parameter int unsigned N = 2048,
  parameter int unsigned P = 64,
  localparam int unsigned STAGES = $clog2(N),
  localparam int unsigned CYC    = N / (2 * P),
  localparam int unsigned AW     = $clog2(N),
  localparam int unsigned SW     = $clog2(STAGES),
  localparam int unsigned CW     = (CYC > 1) ? $clog2(CYC) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,   // a sample is offered in PH_LOAD
  output fft_phase_t    phase,
  output logic          in_ready,   // PH_LOAD: the input register accepts a sample
  output logic [AW-1:0] load_addr,  // input register address for the offered sample
  output logic          rd_en,      // BCUs capture inputs this cycle
  output logic [SW-1:0] rd_stage,
  output logic [CW-1:0] rd_cyc,
  output logic          src_is_b,   // current stage reads bank B
  output logic          wr_en,      // BCU results are written this cycle
  output logic [CW-1:0] wr_cyc,
  output logic          wr_to_b,    // results go to bank B
  output logic          out_en,     // PH_OUT: bin out_cnt is read this cycle
  output logic [AW-1:0] out_cnt,
  output logic          out_from_b, // the finished transform lies in bank B
  output logic          stage_done  // pulse: one stage finished (for monitoring)
);
  localparam logic [SW-1:0] LAST_STAGE = SW'(STAGES - 1);
  localparam logic [CW:0]   LAST_CYC   = (CW+1)'(CYC);   // drain cycle

  fft_phase_t    phase_q;
  logic [AW-1:0] cnt_q;      // load address or read-out bin
  logic [SW-1:0] stage_q;
  logic [CW:0]   cyc_q;      // 0 .. CYC (CYC is the drain cycle)
  logic          wr_en_q;
  logic [CW-1:0] wr_cyc_q;
  logic          wr_to_b_q;

  assign phase      = phase_q;
  assign in_ready   = (phase_q == PH_LOAD);
  assign load_addr  = cnt_q;
  assign rd_en      = (phase_q == PH_COMP) && (cyc_q != LAST_CYC);
  assign rd_stage   = stage_q;
  assign rd_cyc     = cyc_q[CW-1:0];
  assign src_is_b   = stage_q[0];
  assign wr_en      = wr_en_q;
  assign wr_cyc     = wr_cyc_q;
  assign wr_to_b    = wr_to_b_q;
  assign out_en     = (phase_q == PH_OUT);
  assign out_cnt    = cnt_q;
  assign out_from_b = (STAGES % 2) == 1;
  assign stage_done = (phase_q == PH_COMP) && (cyc_q == LAST_CYC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q   <= PH_LOAD;
      cnt_q     <= '0;
      stage_q   <= '0;
      cyc_q     <= '0;
      wr_en_q   <= 1'b0;
      wr_cyc_q  <= '0;
      wr_to_b_q <= 1'b0;
    end else begin
      wr_en_q   <= rd_en;
      wr_cyc_q  <= rd_cyc;
      wr_to_b_q <= ~stage_q[0];
      unique case (phase_q)
        PH_LOAD: if (in_valid) begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == AW'(N - 1)) begin
            phase_q <= PH_COMP;
            stage_q <= '0;
            cyc_q   <= '0;
          end
        end
        PH_COMP: begin
          if (cyc_q == LAST_CYC) begin
            cyc_q <= '0;
            if (stage_q == LAST_STAGE) begin
              phase_q <= PH_OUT;
              cnt_q   <= '0;
            end else begin
              stage_q <= stage_q + 1'b1;
            end
          end else begin
            cyc_q <= cyc_q + 1'b1;
          end
        end
        PH_OUT: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == AW'(N - 1)) phase_q <= PH_LOAD;
        end
        default: phase_q <= PH_LOAD;
      endcase
    end
  end
endmodule
