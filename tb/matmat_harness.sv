// Test harness for one matmat_unit instance (used by tb_matmat_unit).
//
// Runs RUNS products C = A B. With FIG_EXAMPLE set, the first run is the
// 2 x 2 example A = [1 2; 3 4], B = [5 6; 7 8], whose product is
// [19 22; 43 50] (hex 13 16 2b 32); one run uses all-ones operands, the rest
// random ones. After loading both buffers and pulsing start it counts the
// cycles busy stays high, which must be (M/D)*(P/D)*N, counts blk_valid
// pulses, which must be one per output block, and compares c with the
// product computed here once done has pulsed.
module matmat_harness #(
  parameter int unsigned M  = 2,
  parameter int unsigned N  = 2,
  parameter int unsigned P  = 2,
  parameter int unsigned D  = 2,
  parameter int unsigned DW = 8,
  parameter int unsigned RUNS = 10,
  parameter bit FIG_EXAMPLE = 1'b0
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output int   blocks_seen,
  output logic finished
);
  localparam int unsigned AW = 2 * DW + ((N > 1) ? $clog2(N) : 0);
  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1;

  logic          a_we, b_we, start, busy, blk_valid, done;
  logic [MW-1:0] a_r;
  logic [NW-1:0] a_c, b_r;
  logic [PW-1:0] b_c;
  logic [DW-1:0] a_wdata, b_wdata;
  logic [AW-1:0] c [M][P];

  matmat_unit #(.M(M), .N(N), .P(P), .D(D), .DW(DW)) u_dut (
    .clk, .rst, .a_we, .a_r, .a_c, .a_wdata, .b_we, .b_r, .b_c, .b_wdata,
    .start, .busy, .blk_valid, .done, .c
  );

  int unsigned A [M][N];
  int unsigned B [N][P];
  int unsigned C [M][P];
  int          busy_cycles, blks, dones;

  initial begin
    checks = 0; failures = 0; blocks_seen = 0; finished = 0;
    a_we = 0; b_we = 0; start = 0; a_r = 0; a_c = 0; b_r = 0; b_c = 0; a_wdata = 0; b_wdata = 0;
    @(negedge rst);
    for (int run = 0; run < RUNS; run++) begin
      automatic bit fig  = FIG_EXAMPLE && (run == 0);
      automatic bit maxv = (run == 1);
      for (int r = 0; r < M; r++) for (int k = 0; k < N; k++)
        A[r][k] = fig ? r * N + k + 1 : maxv ? (1 << DW) - 1 : $urandom_range(0, (1 << DW) - 1);
      for (int k = 0; k < N; k++) for (int q = 0; q < P; q++)
        B[k][q] = fig ? k * P + q + 5 : maxv ? (1 << DW) - 1 : $urandom_range(0, (1 << DW) - 1);
      for (int r = 0; r < M; r++) for (int q = 0; q < P; q++) begin
        C[r][q] = 0;
        for (int k = 0; k < N; k++) C[r][q] += A[r][k] * B[k][q];
      end
      if (fig) begin
        checks++;
        if (C[0][0] != 'h13 || C[0][1] != 'h16 || C[1][0] != 'h2b || C[1][1] != 'h32) begin
          failures++; $display("reference model disagrees with the 2 x 2 example");
        end
      end
      @(posedge clk); #1;
      for (int r = 0; r < M; r++) for (int k = 0; k < N; k++) begin
        a_we = 1; a_r = MW'(r); a_c = NW'(k); a_wdata = DW'(A[r][k]);
        @(posedge clk); #1;
      end
      a_we = 0;
      for (int k = 0; k < N; k++) for (int q = 0; q < P; q++) begin
        b_we = 1; b_r = NW'(k); b_c = PW'(q); b_wdata = DW'(B[k][q]);
        @(posedge clk); #1;
      end
      b_we = 0;
      start = 1;
      @(posedge clk); #1;
      start = 0;
      busy_cycles = 0; blks = 0; dones = 0;
      for (int t = 0; t < (M / D) * (P / D) * N + 10; t++) begin
        if (busy) busy_cycles++;
        if (blk_valid) blks++;
        if (done) dones++;
        @(posedge clk); #1;
      end
      blocks_seen += blks;
      checks++;
      if (busy_cycles != (M / D) * (P / D) * N) begin
        failures++; $display("busy for %0d cycles, expected %0d", busy_cycles, (M / D) * (P / D) * N);
      end
      checks++;
      if (blks != (M / D) * (P / D) || dones != 1) begin
        failures++; $display("%0d blocks and %0d done pulses", blks, dones);
      end
      for (int r = 0; r < M; r++) for (int q = 0; q < P; q++) begin
        checks++;
        if (32'(c[r][q]) != C[r][q]) begin
          failures++; $display("C[%0d][%0d]: got %0d expected %0d", r, q, c[r][q], C[r][q]);
        end
      end
    end
    finished = 1;
  end
endmodule
