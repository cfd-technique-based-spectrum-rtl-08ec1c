// tb_fft_ctrl: self-checking test of the shared-stage FFT controller at N = 64, P = 4
// (6 stages of 8 cycles).  Samples are offered with random gaps; the test checks that
// exactly N are taken at addresses 0..N-1, that every stage reads cycles 0..CYC-1 in
// order and writes each one a cycle later into the other bank, that the computation
// takes STAGES*(CYC+1) cycles, that N read-out cycles follow in order, and that the
// controller then returns to loading.  Two frames are run.
module tb_fft_ctrl;
  import cfd_pkg::*;
  localparam int N = 64, P = 4, STAGES = 6, CYC = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  fft_phase_t phase;
  logic in_ready, rd_en, src_is_b, wr_en, wr_to_b, out_en, out_from_b, stage_done;
  logic [5:0] load_addr, out_cnt;
  logic [2:0] rd_stage;
  logic [2:0] rd_cyc, wr_cyc;

  fft_ctrl #(.N(N), .P(P)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_true(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int taken, comp_cycles, rd_count, wr_count, stages, exp_cyc, prev_cyc, prev_stage;
    logic prev_rd;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 2; frame++) begin
      // ---- load
      taken = 0;
      while (taken < N) begin
        @(negedge clk);
        expect_true(phase == PH_LOAD && in_ready, "in_ready during load");
        in_valid = ($urandom % 3) != 0;
        if (in_valid) begin
          expect_true(int'(load_addr) == taken, "load address");
          taken++;
        end
        @(posedge clk);
        #1 in_valid = 0;
      end
      // ---- compute
      comp_cycles = 0; rd_count = 0; wr_count = 0; stages = 0; exp_cyc = 0;
      prev_rd = 0; prev_cyc = 0; prev_stage = 0;
      @(negedge clk);
      while (phase == PH_COMP) begin
        expect_true(!in_ready, "no input during compute");
        if (wr_en) begin
          wr_count++;
          expect_true(prev_rd && int'(wr_cyc) == prev_cyc, "write follows read by one cycle");
          expect_true(wr_to_b == (prev_stage % 2 == 0), "write goes to the other bank");
        end
        if (rd_en) begin
          expect_true(int'(rd_cyc) == exp_cyc, "read cycle order");
          expect_true(int'(rd_stage) == stages, "stage number");
          expect_true(src_is_b == (stages % 2 == 1), "source bank");
          exp_cyc++;
          rd_count++;
        end
        if (stage_done) begin
          expect_true(exp_cyc == CYC, "stage has CYC reads");
          exp_cyc = 0;
          stages++;
        end
        prev_rd = rd_en; prev_cyc = int'(rd_cyc); prev_stage = int'(rd_stage);
        comp_cycles++;
        @(negedge clk);
      end
      expect_true(comp_cycles == STAGES * (CYC + 1), $sformatf("compute cycles %0d", comp_cycles));
      expect_true(stages == STAGES, "stage count");
      expect_true(rd_count == STAGES * CYC && wr_count == STAGES * CYC, "read and write count");
      // ---- read-out
      for (int k = 0; k < N; k++) begin
        expect_true(out_en && int'(out_cnt) == k, "read-out order");
        expect_true(out_from_b == 1'b0, "6 stages end in bank A");
        @(negedge clk);
      end
      expect_true(phase == PH_LOAD && !out_en, "back to load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
