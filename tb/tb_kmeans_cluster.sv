// tb_kmeans_cluster - clusters 75 weights and checks the result by the
// properties every converged K-means solution has:
//   * at most k distinct values come out;
//   * every weight is mapped to the nearest of those values;
//   * every value is, within 1 LSB, the mean of the weights mapped to it;
//   * finish is seen N + iter * (N + k) clocks after the clock that samples
//     start.
// A directed case with three well separated groups must give the three
// group means exactly. clr must drop finish.
module tb_kmeans_cluster;
  import cnn_pkg::*;
  localparam int N = N_WEIGHTS;
  logic clk = 0, rst_n = 0, start = 0, clr = 0;
  logic [K_W-1:0] k;
  weight_t wi [N];
  weight_t wo [N];
  logic finish, busy;
  logic [7:0] iter;
  int checks = 0, failures = 0;

  kmeans_cluster #(.N(N), .K(K_MAX), .MAX_ITER(255)) dut (
    .clk, .rst_n, .start_i(start), .clr_i(clr), .k_i(k), .w_i(wi), .w_o(wo),
    .finish_o(finish), .busy_o(busy), .iter_o(iter));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input int kk);
    int cycles, nd;
    int vals [$];
    @(negedge clk);
    k = K_W'(kk); start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!finish) begin @(negedge clk); cycles++; end
    check(cycles == N + int'(iter) * (N + kk) + 1, $sformatf("k=%0d cycles %0d iter %0d", kk, cycles, iter));
    // distinct outputs
    for (int i = 0; i < N; i++) begin
      bit seen;
      seen = 0;
      foreach (vals[j]) if (vals[j] == int'(wo[i])) seen = 1;
      if (!seen) vals.push_back(int'(wo[i]));
    end
    nd = vals.size();
    check(nd <= kk, $sformatf("k=%0d distinct %0d", kk, nd));
    // nearest and mean
    for (int i = 0; i < N; i++) begin
      int dme;
      dme = (int'(wi[i]) > int'(wo[i])) ? int'(wi[i]) - int'(wo[i]) : int'(wo[i]) - int'(wi[i]);
      foreach (vals[j]) begin
        int dj;
        dj = (int'(wi[i]) > vals[j]) ? int'(wi[i]) - vals[j] : vals[j] - int'(wi[i]);
        check(dme <= dj, $sformatf("k=%0d weight %0d not at nearest centroid", kk, i));
      end
    end
    foreach (vals[j]) begin
      real s;
      int c;
      s = 0.0; c = 0;
      for (int i = 0; i < N; i++) if (int'(wo[i]) == vals[j]) begin s += real'(wi[i]); c++; end
      check(real'(vals[j]) - s / c <= 1.0 && s / c - real'(vals[j]) <= 1.0,
            $sformatf("k=%0d centroid %0d is not its mean %f", kk, vals[j], s / c));
    end
    $display("k=%0d iterations=%0d distinct=%0d cycles=%0d", kk, iter, nd, cycles);
  endtask

  initial begin
    int ks [6] = '{3, 1, 8, 15, 38, 64};
    k = 1;
    for (int i = 0; i < N; i++) wi[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed: three groups, means -500, 12, 700
    for (int i = 0; i < N; i++)
      case (i % 3)
        0: wi[i] = weight_t'(-500 + ((i % 2) ? 4 : -4));
        1: wi[i] = weight_t'(12 + ((i % 2) ? 1 : -1));
        default: wi[i] = weight_t'(700 + ((i % 2) ? 2 : -2));
      endcase
    run(3);
    for (int i = 0; i < N; i++) begin
      int ex;
      ex = (i % 3 == 0) ? -500 : (i % 3 == 1) ? 12 : 700;
      // each group has 25 members, alternating +d/-d: 13 of one sign, 12 of the other
      check(int'(wo[i]) >= ex - 1 && int'(wo[i]) <= ex + 1, $sformatf("directed weight %0d got %0d", i, wo[i]));
    end
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    check(!finish, "finish not cleared");
    for (int r = 0; r < 2; r++)
      foreach (ks[j]) begin
        for (int i = 0; i < N; i++)
          wi[i] = (r == 0) ? weight_t'($urandom_range(0, 4095)) : weight_t'(int'($urandom_range(0, 400)) - 200);
        run(ks[j]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
