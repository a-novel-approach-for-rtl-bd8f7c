// tb_max_tree: checks the binary max tree for the term counts the RVE block
// uses (4, 6, 12) and for odd sizes (1, 5), with random signed terms that
// include negative values and ties; the expected maximum is found by a
// linear scan.
module tb_max_tree;
  localparam int W = 19;
  int checks = 0, failures = 0;

  logic signed [W-1:0] t1 [1], t4 [4], t5 [5], t6 [6], t12 [12];
  logic signed [W-1:0] r1, r4, r5, r6, r12;

  max_tree #(.N(1),  .W(W)) u1  (.terms(t1),  .result(r1));
  max_tree #(.N(4),  .W(W)) u4  (.terms(t4),  .result(r4));
  max_tree #(.N(5),  .W(W)) u5  (.terms(t5),  .result(r5));
  max_tree #(.N(6),  .W(W)) u6  (.terms(t6),  .result(r6));
  max_tree #(.N(12), .W(W)) u12 (.terms(t12), .result(r12));

  function automatic logic signed [W-1:0] rnd();
    int v;
    case ($urandom % 4)
      0:       v = int'($urandom % 16) - 8;          // small, ties likely
      1:       v = -int'($urandom % 200000);         // negative
      default: v = int'($urandom % 200000) - 100000;
    endcase
    return W'(v);
  endfunction

  task automatic expect_max(string name, logic signed [W-1:0] got, int exp);
    checks++;
    if (int'(got) != exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", name, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      int m1, m4, m5, m6, m12;
      t1[0] = rnd(); m1 = int'(t1[0]);
      m4 = -1 << 30; m5 = m4; m6 = m4; m12 = m4;
      foreach (t4[i])  begin t4[i]  = rnd(); if (int'(t4[i])  > m4)  m4  = int'(t4[i]);  end
      foreach (t5[i])  begin t5[i]  = rnd(); if (int'(t5[i])  > m5)  m5  = int'(t5[i]);  end
      foreach (t6[i])  begin t6[i]  = rnd(); if (int'(t6[i])  > m6)  m6  = int'(t6[i]);  end
      foreach (t12[i]) begin t12[i] = rnd(); if (int'(t12[i]) > m12) m12 = int'(t12[i]); end
      #1;
      expect_max("n1", r1, m1);
      expect_max("n4", r4, m4);
      expect_max("n5", r5, m5);
      expect_max("n6", r6, m6);
      expect_max("n12", r12, m12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
