// Self-checking testbench for dot_product.
//
// Three instances: the default (8 one-bit elements), 8 elements of 6 bits,
// and 6 elements of 3 bits (3 pipelines, adder tree padded). New vector pairs
// are presented back to back with random gaps. Each cycle the per-pipeline
// results are compared with the vectors of 2 cycles earlier and the dot
// product with those of 2 + clog2(N/2) = 4 cycles earlier (one iteration per
// vector pair, adder-tree latency on top).
module tb_dot_product;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int H = 6;   // history depth

  // default instance: N = 8, DW = 1
  logic       va, pva, ova;
  logic [0:0] aa [8], ba [8];
  logic [2:0] pya [4];
  logic [4:0] ya;
  dot_product u_a (.clk, .rst, .in_valid(va), .a(aa), .b(ba), .pair_valid(pva), .pair_y(pya),
                   .out_valid(ova), .y(ya));

  // N = 8, DW = 6
  logic       vb, pvb, ovb;
  logic [5:0] ab [8], bb [8];
  logic [12:0] pyb [4];
  logic [14:0] yb;
  dot_product #(.N(8), .DW(6)) u_b (.clk, .rst, .in_valid(vb), .a(ab), .b(bb), .pair_valid(pvb),
                                    .pair_y(pyb), .out_valid(ovb), .y(yb));

  // N = 6, DW = 3
  logic       vc, pvc, ovc;
  logic [2:0] ac [6], bc [6];
  logic [6:0] pyc [3];
  logic [8:0] yc;
  dot_product #(.N(6), .DW(3)) u_c (.clk, .rst, .in_valid(vc), .a(ac), .b(bc), .pair_valid(pvc),
                                    .pair_y(pyc), .out_valid(ovc), .y(yc));

  // history of presented sets: valid, pair results, dot product
  logic        hv [3][H];
  int unsigned hp [3][H][4];
  int unsigned hy [3][H];

  task automatic check_inst(int k, logic pv, logic ov, int unsigned py [4], int unsigned y, int np);
    bit bad = (pv !== hv[k][1]);
    if (pv) for (int i = 0; i < np; i++)
      if (py[i] != hp[k][1][i]) begin
        bad = 1'b1; $display("inst %0d pair %0d: got %0d exp %0d", k, i, py[i], hp[k][1][i]);
      end
    checks++;
    if (bad) begin failures++; $display("inst %0d pipeline results wrong", k); end
    checks++;
    if (ov !== hv[k][3] || (ov && y != hy[k][3])) begin
      failures++; $display("inst %0d y: got v=%0d y=%0d exp v=%0d y=%0d", k, ov, y, hv[k][3], hy[k][3]);
    end
  endtask

  int unsigned pa [4], pb [4], pc [4];
  int          nvec = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    va = 0; vb = 0; vc = 0;
    foreach (aa[i]) begin aa[i] = 0; ba[i] = 0; ab[i] = 0; bb[i] = 0; end
    foreach (ac[i]) begin ac[i] = 0; bc[i] = 0; end
    for (int k = 0; k < 3; k++) for (int t = 0; t < H; t++) begin
      hv[k][t] = 0; hy[k][t] = 0; for (int i = 0; i < 4; i++) hp[k][t][i] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 1000; t++) begin
      // drive: the first 256 cycles walk every pair (a, b) of one-bit vectors
      // in the default instance with valid held high (back-to-back issue)
      va = (t < 256) ? 1'b1 : 1'($urandom_range(0, 1));
      vb = 1'($urandom_range(0, 3) != 0);
      vc = 1'($urandom_range(0, 3) != 0);
      for (int i = 0; i < 8; i++) begin
        aa[i] = (t < 256) ? 1'(t >> (i % 4)) : 1'($urandom);
        ba[i] = (t < 256) ? 1'(t >> (4 + i % 4)) : 1'($urandom);
        ab[i] = (t % 37 == 0) ? 6'h3f : 6'($urandom);
        bb[i] = (t % 37 == 0) ? 6'h3f : 6'($urandom);
      end
      for (int i = 0; i < 6; i++) begin
        ac[i] = (t % 29 == 0) ? 3'h7 : 3'($urandom);
        bc[i] = (t % 29 == 0) ? 3'h7 : 3'($urandom);
      end
      if (va) nvec++;
      hv[0][0] = va; hv[1][0] = vb; hv[2][0] = vc;
      hy[0][0] = 0; hy[1][0] = 0; hy[2][0] = 0;
      for (int i = 0; i < 4; i++) begin
        hp[0][0][i] = aa[2*i] * ba[2*i] + aa[2*i+1] * ba[2*i+1];
        hp[1][0][i] = ab[2*i] * bb[2*i] + ab[2*i+1] * bb[2*i+1];
        hp[2][0][i] = (i < 3) ? ac[2*i] * bc[2*i] + ac[2*i+1] * bc[2*i+1] : 0;
        for (int k = 0; k < 3; k++) hy[k][0] += hp[k][0][i];
      end
      @(posedge clk);
      #1;
      if (t >= H) begin
        foreach (pa[i]) begin pa[i] = pya[i]; pb[i] = pyb[i]; pc[i] = (i < 3) ? pyc[i] : 0; end
        check_inst(0, pva, ova, pa, ya, 4);
        check_inst(1, pvb, ovb, pb, yb, 4);
        check_inst(2, pvc, ovc, pc, yc, 3);
      end
      for (int k = 0; k < 3; k++)
        for (int s = H - 1; s > 0; s--) begin
          hv[k][s] = hv[k][s-1]; hy[k][s] = hy[k][s-1];
          for (int i = 0; i < 4; i++) hp[k][s][i] = hp[k][s-1][i];
        end
    end
    $display("vector pairs issued to the default instance: %0d", nvec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
