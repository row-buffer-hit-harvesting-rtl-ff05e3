// tb_age_arbiter: random self-check of the magnitude-comparator arbiter.
// Each trial draws random valid bits and keys (with many equal keys to
// exercise the tie rule) and compares the grant with a linear scan that
// keeps the first maximum.
module tb_age_arbiter;
  localparam int N = 60;
  localparam int KW = 13;
  localparam int IW = $clog2(N);

  logic [N-1:0]         valid;
  logic [N-1:0][KW-1:0] key;
  logic                 gv;
  logic [IW-1:0]        gi;
  int checks = 0, failures = 0;

  age_arbiter #(.N(N), .KEY_W(KW)) dut (.valid, .key, .grant_valid(gv), .grant_idx(gi));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      bit exp_v;
      int exp_i;
      int density;
      density = (t % 4 == 0) ? 3 : 50;   // sometimes few candidates
      for (int i = 0; i < N; i++) begin
        valid[i] = ($urandom_range(99) < density);
        key[i]   = (t % 2) ? KW'($urandom_range(7)) : KW'($urandom);
      end
      if (t == 0) valid = '0;
      #1;
      exp_v = 0; exp_i = 0;
      for (int i = 0; i < N; i++)
        if (valid[i] && (!exp_v || key[i] > key[exp_i])) begin exp_v = 1; exp_i = i; end
      checks++;
      if (gv !== exp_v) begin failures++; $display("trial %0d: grant_valid %0d exp %0d", t, gv, exp_v); end
      if (exp_v) begin
        checks++;
        if (int'(gi) != exp_i) begin
          failures++;
          if (failures < 10) $display("trial %0d: idx %0d exp %0d", t, gi, exp_i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
