// End-to-end harness for linalg_top (used by tb_linalg_top and
// tb_linalg_top_full).
//
// Drives all three engines of the top at the same time and checks them
// against products computed here:
//   dot product   - DP_VECS vector pairs, mostly back to back, checked at
//                   latency 2 + clog2(DP_N/2);
//   matrix-vector - MV_RUNS products with random gaps in the matrix stream,
//                   every row, pass and the cycle count checked;
//   matrix-matrix - MM_RUNS products, the first the 2 x 2 example
//                   [1 2; 3 4] x [5 6; 7 8] when the sizes allow, every
//                   element, block count and busy time checked.
// It counts how often each mechanism happened: back-to-back dot products,
// matrix-vector multi-pass products and stream stalls, and block-tiled
// matrix products that accumulate several basic blocks. With FULL set the
// top is instantiated with its default parameters (the FULL and the
// parameter values given must then match those defaults).
module linalg_top_harness #(
  parameter bit          FULL     = 1'b0,
  parameter int unsigned DP_N     = 8,
  parameter int unsigned DP_DW    = 1,
  parameter int unsigned MV_ROWS  = 8,
  parameter int unsigned MV_COLS  = 8,
  parameter int unsigned MV_PIPES = 8,
  parameter int unsigned MV_DW    = 5,
  parameter int unsigned MM_M     = 2,
  parameter int unsigned MM_N     = 2,
  parameter int unsigned MM_P     = 2,
  parameter int unsigned MM_D     = 2,
  parameter int unsigned MM_DW    = 8,
  parameter int unsigned DP_VECS  = 300,
  parameter int unsigned MV_RUNS  = 10,
  parameter int unsigned MM_RUNS  = 10
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output int   n_back_to_back,
  output int   n_multipass,
  output int   n_stalls,
  output int   n_tiled,
  output logic finished
);
  localparam int unsigned DP_PW = 2 * DP_DW + 1;
  localparam int unsigned DP_L  = ((DP_N / 2) > 1) ? $clog2(DP_N / 2) : 0;
  localparam int unsigned DP_YW = DP_PW + DP_L;
  localparam int unsigned MV_G  = (MV_ROWS + MV_PIPES - 1) / MV_PIPES;
  localparam int unsigned MV_AW = 2 * MV_DW + ((MV_COLS > 1) ? $clog2(MV_COLS) : 0);
  localparam int unsigned MV_JW = (MV_COLS > 1) ? $clog2(MV_COLS) : 1;
  localparam int unsigned MV_GW = (MV_G > 1) ? $clog2(MV_G) : 1;
  localparam int unsigned MM_AW = 2 * MM_DW + ((MM_N > 1) ? $clog2(MM_N) : 0);
  localparam int unsigned MM_MW = (MM_M > 1) ? $clog2(MM_M) : 1;
  localparam int unsigned MM_NW = (MM_N > 1) ? $clog2(MM_N) : 1;
  localparam int unsigned MM_PW = (MM_P > 1) ? $clog2(MM_P) : 1;
  localparam int unsigned MM_BLKS = (MM_M / MM_D) * (MM_P / MM_D);

  // top ports
  logic                dp_in_valid, dp_pair_valid, dp_out_valid;
  logic [DP_DW-1:0]    dp_a [DP_N], dp_b [DP_N];
  logic [DP_PW-1:0]    dp_pair_y [DP_N/2];
  logic [DP_YW-1:0]    dp_y;
  logic                mv_x_we, mv_start, mv_busy, mv_a_valid, mv_a_ready, mv_y_valid, mv_done;
  logic [MV_JW-1:0]    mv_x_addr;
  logic [MV_DW-1:0]    mv_x_wdata;
  logic [MV_DW-1:0]    mv_a_data [MV_PIPES];
  logic [MV_GW-1:0]    mv_y_group;
  logic [MV_PIPES-1:0] mv_y_mask;
  logic [MV_AW-1:0]    mv_y [MV_PIPES];
  logic                mm_a_we, mm_b_we, mm_start, mm_busy, mm_blk_valid, mm_done;
  logic [MM_MW-1:0]    mm_a_r;
  logic [MM_NW-1:0]    mm_a_c, mm_b_r;
  logic [MM_PW-1:0]    mm_b_c;
  logic [MM_DW-1:0]    mm_a_wdata, mm_b_wdata;
  logic [MM_AW-1:0]    mm_c [MM_M][MM_P];

  if (FULL) begin : g_full
    linalg_top u_top (.*);
  end else begin : g_scaled
    linalg_top #(
      .DP_N(DP_N), .DP_DW(DP_DW), .MV_ROWS(MV_ROWS), .MV_COLS(MV_COLS), .MV_PIPES(MV_PIPES),
      .MV_DW(MV_DW), .MM_M(MM_M), .MM_N(MM_N), .MM_P(MM_P), .MM_D(MM_D), .MM_DW(MM_DW)
    ) u_top (.*);
  end

  logic dp_fin, mv_fin, mm_fin;
  assign finished = dp_fin && mv_fin && mm_fin;

  initial begin
    checks = 0; failures = 0; n_back_to_back = 0; n_multipass = 0; n_stalls = 0; n_tiled = 0;
  end

  // ---------------------------------------------------------------- dot product
  int unsigned dp_hist_y [DP_L + 3];
  logic        dp_hist_v [DP_L + 3];
  initial begin
    dp_fin = 0; dp_in_valid = 0;
    foreach (dp_a[i]) begin dp_a[i] = 0; dp_b[i] = 0; end
    foreach (dp_hist_y[i]) begin dp_hist_y[i] = 0; dp_hist_v[i] = 0; end
    @(negedge rst);
    for (int t = 0; t < DP_VECS + DP_L + 3; t++) begin
      automatic logic prev = dp_in_valid;
      dp_in_valid = (t < DP_VECS) && ($urandom_range(0, 4) != 0);
      if (prev && dp_in_valid) n_back_to_back++;
      dp_hist_y[0] = 0;
      foreach (dp_a[i]) begin
        dp_a[i] = DP_DW'($urandom); dp_b[i] = DP_DW'($urandom);
        dp_hist_y[0] += dp_a[i] * dp_b[i];
      end
      dp_hist_v[0] = dp_in_valid;
      @(posedge clk); #1;
      if (t >= DP_L + 2) begin
        checks++;
        if (dp_out_valid !== dp_hist_v[DP_L + 1] ||
            (dp_out_valid && 32'(dp_y) != dp_hist_y[DP_L + 1])) begin
          failures++;
          $display("dot product t=%0d: got v=%0d y=%0d expected v=%0d y=%0d", t, dp_out_valid,
                   dp_y, dp_hist_v[DP_L + 1], dp_hist_y[DP_L + 1]);
        end
      end
      for (int s = DP_L + 2; s > 0; s--) begin dp_hist_y[s] = dp_hist_y[s-1]; dp_hist_v[s] = dp_hist_v[s-1]; end
    end
    dp_fin = 1;
  end

  // ---------------------------------------------------------------- matrix-vector
  int unsigned mv_A [MV_ROWS][MV_COLS];
  int unsigned mv_X [MV_COLS];
  int unsigned mv_Y [MV_ROWS];
  int          mv_passes, mv_cycles, mv_idles;
  logic        mv_seen_done;

  always @(posedge clk) begin
    #2;
    if (!rst && mv_y_valid) begin
      checks++;
      if (32'(mv_y_group) != mv_passes) begin failures++; $display("matvec: wrong pass index"); end
      for (int p = 0; p < MV_PIPES; p++) begin
        automatic int r = mv_passes * MV_PIPES + p;
        if (r < MV_ROWS) begin
          checks++;
          if (32'(mv_y[p]) != mv_Y[r] || !mv_y_mask[p]) begin
            failures++; $display("matvec row %0d: got %0d expected %0d", r, mv_y[p], mv_Y[r]);
          end
        end
      end
      mv_passes++;
    end
    if (!rst && mv_done) mv_seen_done = 1;
  end

  initial begin
    mv_fin = 0; mv_x_we = 0; mv_start = 0; mv_a_valid = 0; mv_x_addr = 0; mv_x_wdata = 0;
    foreach (mv_a_data[p]) mv_a_data[p] = 0;
    @(negedge rst);
    for (int run = 0; run < MV_RUNS; run++) begin
      for (int j = 0; j < MV_COLS; j++) mv_X[j] = $urandom_range(0, (1 << MV_DW) - 1);
      for (int r = 0; r < MV_ROWS; r++) begin
        mv_Y[r] = 0;
        for (int j = 0; j < MV_COLS; j++) begin
          mv_A[r][j] = $urandom_range(0, (1 << MV_DW) - 1);
          mv_Y[r] += mv_A[r][j] * mv_X[j];
        end
      end
      @(posedge clk); #1;
      for (int j = 0; j < MV_COLS; j++) begin
        mv_x_we = 1; mv_x_addr = MV_JW'(j); mv_x_wdata = MV_DW'(mv_X[j]);
        @(posedge clk); #1;
      end
      mv_x_we = 0; mv_start = 1;
      @(posedge clk); #1;
      mv_start = 0;
      mv_passes = 0; mv_cycles = 0; mv_idles = 0; mv_seen_done = 0;
      for (int g = 0; g < MV_G; g++)
        for (int j = 0; j < MV_COLS; j++) begin
          while ($urandom_range(0, 5) == 0) begin
            mv_a_valid = 0; mv_idles++; n_stalls++;
            @(posedge clk); #1; mv_cycles++;
          end
          mv_a_valid = 1;
          for (int p = 0; p < MV_PIPES; p++) begin
            automatic int r = g * MV_PIPES + p;
            mv_a_data[p] = (r < MV_ROWS) ? MV_DW'(mv_A[r][j]) : '0;
          end
          @(posedge clk); #1; mv_cycles++;
        end
      mv_a_valid = 0;
      @(posedge clk); #3;
      checks++;
      if (!mv_seen_done || mv_passes != MV_G || mv_cycles != MV_G * MV_COLS + mv_idles) begin
        failures++;
        $display("matvec run %0d: done=%0d passes=%0d cycles=%0d", run, mv_seen_done, mv_passes, mv_cycles);
      end
      if (mv_passes > 1) n_multipass++;
    end
    mv_fin = 1;
  end

  // ---------------------------------------------------------------- matrix-matrix
  int unsigned mm_A [MM_M][MM_N];
  int unsigned mm_B [MM_N][MM_P];
  int unsigned mm_C [MM_M][MM_P];
  initial begin
    mm_fin = 0; mm_a_we = 0; mm_b_we = 0; mm_start = 0;
    mm_a_r = 0; mm_a_c = 0; mm_b_r = 0; mm_b_c = 0; mm_a_wdata = 0; mm_b_wdata = 0;
    @(negedge rst);
    for (int run = 0; run < MM_RUNS; run++) begin
      automatic int busy_cycles = 0, blks = 0;
      automatic bit fig = (run == 0) && (MM_M == 2) && (MM_N == 2) && (MM_P == 2);
      for (int r = 0; r < MM_M; r++) for (int k = 0; k < MM_N; k++)
        mm_A[r][k] = fig ? r * 2 + k + 1 : $urandom_range(0, (1 << MM_DW) - 1);
      for (int k = 0; k < MM_N; k++) for (int q = 0; q < MM_P; q++)
        mm_B[k][q] = fig ? k * 2 + q + 5 : $urandom_range(0, (1 << MM_DW) - 1);
      for (int r = 0; r < MM_M; r++) for (int q = 0; q < MM_P; q++) begin
        mm_C[r][q] = 0;
        for (int k = 0; k < MM_N; k++) mm_C[r][q] += mm_A[r][k] * mm_B[k][q];
      end
      @(posedge clk); #1;
      for (int r = 0; r < MM_M; r++) for (int k = 0; k < MM_N; k++) begin
        mm_a_we = 1; mm_a_r = MM_MW'(r); mm_a_c = MM_NW'(k); mm_a_wdata = MM_DW'(mm_A[r][k]);
        @(posedge clk); #1;
      end
      mm_a_we = 0;
      for (int k = 0; k < MM_N; k++) for (int q = 0; q < MM_P; q++) begin
        mm_b_we = 1; mm_b_r = MM_NW'(k); mm_b_c = MM_PW'(q); mm_b_wdata = MM_DW'(mm_B[k][q]);
        @(posedge clk); #1;
      end
      mm_b_we = 0; mm_start = 1;
      @(posedge clk); #1;
      mm_start = 0;
      while (!mm_done) begin
        if (mm_busy) busy_cycles++;
        if (mm_blk_valid) blks++;
        @(posedge clk); #1;
      end
      blks++;   // the last block shows together with done
      checks++;
      if (busy_cycles != MM_BLKS * MM_N || blks != MM_BLKS) begin
        failures++; $display("matmat run %0d: busy %0d cycles, %0d blocks", run, busy_cycles, blks);
      end
      if (fig) begin
        checks++;
        if (mm_c[0][0] != 'h13 || mm_c[0][1] != 'h16 || mm_c[1][0] != 'h2b || mm_c[1][1] != 'h32) begin
          failures++; $display("matmat: 2 x 2 example gives a wrong product");
        end
      end
      for (int r = 0; r < MM_M; r++) for (int q = 0; q < MM_P; q++) begin
        checks++;
        if (32'(mm_c[r][q]) != mm_C[r][q]) begin
          failures++; $display("matmat C[%0d][%0d]: got %0d expected %0d", r, q, mm_c[r][q], mm_C[r][q]);
        end
      end
      if (MM_BLKS > 1 && MM_N > MM_D) n_tiled++;
    end
    mm_fin = 1;
  end
endmodule
