// tb_mterm_preadd: self-checking test of the operand side of an M-term step,
// for M = 2..7 with S = 5. For M = 2 and 3 the expected words are worked out
// here from the classic formulas: the M single parts first, then the XOR of
// each pair of parts (i < j) in lexicographic order. For M = 4..7 each word
// must be the XOR of the parts the formula table of kara_pkg lists, the table
// must have the product count of the formula (9, 13, 17, 22), and every
// product must be a distinct, non-empty subset. Whether the tables form a
// correct multiplication formula is checked in tb_mterm_recon.
module tb_mterm_preadd;

  localparam int unsigned S = 5;

  int unsigned checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar gm = 2; gm <= 7; gm++) begin : g_m
    localparam int unsigned K = kara_pkg::num_products(gm);
    logic [gm*S-1:0]      x;
    logic [K-1:0][S-1:0]  y;

    mterm_preadd #(.S(S), .M(gm)) dut (.x(x), .y(y));

    task automatic run();
      logic [S-1:0] expv;
      int           k;
      for (int t = 0; t < 200; t++) begin
        x = (gm*S)'({$urandom, $urandom});
        #1;
        if (gm >= 4) begin
          for (int kk = 0; kk < K; kk++) begin
            expv = '0;
            for (int i = 0; i < gm; i++)
              if (kara_pkg::prod_set(gm, kk)[i]) expv = expv ^ x[i*S +: S];
            checks++;
            if (y[kk] !== expv) begin
              failures++;
              $display("FAIL M=%0d product %0d", gm, kk);
            end
          end
          continue;
        end
        k = 0;
        for (int i = 0; i < gm; i++) begin
          checks++;
          if (y[k] !== x[i*S +: S]) begin
            failures++;
            $display("FAIL M=%0d single part %0d", gm, i);
          end
          k++;
        end
        for (int i = 0; i < gm; i++)
          for (int j = i + 1; j < gm; j++) begin
            expv = x[i*S +: S] ^ x[j*S +: S];
            checks++;
            if (y[k] !== expv) begin
              failures++;
              $display("FAIL M=%0d pair (%0d,%0d)", gm, i, j);
            end
            k++;
          end
      end
    endtask
  end

  // Product counts of the formulas and distinctness of their subsets.
  localparam int unsigned KREF [8] = '{0, 1, 3, 6, 9, 13, 17, 22};

  task automatic check_tables();
    for (int m = 2; m <= 7; m++) begin
      checks++;
      if (kara_pkg::num_products(m) != KREF[m]) begin
        failures++;
        $display("FAIL M=%0d has %0d products", m, kara_pkg::num_products(m));
      end
      for (int k = 0; k < int'(kara_pkg::num_products(m)); k++) begin
        checks++;
        if (kara_pkg::prod_set(m, k) == '0 || (kara_pkg::prod_set(m, k) >> m) != '0) begin
          failures++;
          $display("FAIL M=%0d product %0d has subset %b", m, k, kara_pkg::prod_set(m, k));
        end
        for (int j = 0; j < k; j++)
          if (kara_pkg::prod_set(m, j) == kara_pkg::prod_set(m, k)) begin
            failures++;
            $display("FAIL M=%0d products %0d and %0d equal", m, j, k);
          end
      end
    end
  endtask

  initial begin
    check_tables();
    g_m[2].run();
    g_m[3].run();
    g_m[4].run();
    g_m[5].run();
    g_m[6].run();
    g_m[7].run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
