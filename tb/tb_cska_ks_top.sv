// End-to-end testbench of the 32-bit carry skip adder at its default
// configuration (4-bit stages, Kogge-Stone nucleus at stage 3).
//
// Directed vectors (including the longest carry path, a carry generated in
// stage 1 that skips through every later stage to cout) are followed by
// random vectors. Each result is compared with a + b + cin computed in
// 64-bit integers, and the nucleus group generate/propagate outputs with
// values worked out from the nucleus operand bits. The testbench also
// counts how often each mechanism of the adder was exercised and fails if
// one never was:
//   skip      - a ripple stage above stage 1 passed an incoming carry on
//               through its skip gate (all bits propagate, carry in 1);
//   nuc_skip  - the nucleus stage passed an incoming carry on;
//   nuc_gen   - the nucleus stage generated a carry itself;
//   block_gen - a ripple stage above stage 1 generated a carry itself;
//   increment - an incrementation block added a carry of 1;
//   long_path - a carry from stage 1 reached cout through every stage;
//   cin, cout - carry input / carry output of 1.
module tb_cska_ks_top;
  localparam int W = 32, M = 4, Q = W / M, NUC = 3;

  int checks = 0, failures = 0;
  int n_skip = 0, n_nuc_skip = 0, n_nuc_gen = 0, n_block_gen = 0;
  int n_increment = 0, n_long = 0, n_cin = 0, n_cout = 0;

  logic [W-1:0] a, b, s;
  logic cin, cout, nuc_g, nuc_p;

  cska_ks_top dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout),
                   .nucleus_g(nuc_g), .nucleus_p(nuc_p));

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [63:0] full;
    logic [M-1:0] sa, sb;
    logic c_into, stage_p, stage_g;
    bit   all_prop;
    a = ta; b = tb_; cin = tc;
    #1;
    full = 64'(ta) + 64'(tb_) + 64'(tc);
    checks++;
    if ({cout, s} !== full[W:0]) begin
      failures++;
      $display("sum mismatch a=%h b=%h cin=%b got %b_%h want %h", ta, tb_, tc, cout, s, full[W:0]);
    end
    // Mechanism bookkeeping, from the operands only.
    all_prop = 1;
    for (int k = 2; k <= Q; k++) begin
      logic [63:0] low;
      sa = ta[(k-1)*M +: M];
      sb = tb_[(k-1)*M +: M];
      low = 64'(ta & ((64'd1 << ((k-1)*M)) - 1)) + 64'(tb_ & ((64'd1 << ((k-1)*M)) - 1)) + 64'(tc);
      c_into  = low[(k-1)*M];
      stage_p = &(sa ^ sb);
      stage_g = 1'((5'(sa) + 5'(sb)) >> M);
      all_prop &= stage_p;
      if (k == NUC) begin
        checks++;
        if (nuc_g !== stage_g || nuc_p !== stage_p) begin
          failures++;
          $display("nucleus g/p mismatch a=%h b=%h", ta, tb_);
        end
        if (stage_p && c_into) n_nuc_skip++;
        if (stage_g) n_nuc_gen++;
      end else begin
        if (stage_p && c_into) n_skip++;
        if (stage_g) n_block_gen++;
        if (c_into) n_increment++;
      end
    end
    if (all_prop && 1'((5'(ta[M-1:0]) + 5'(tb_[M-1:0]) + 5'(tc)) >> M)) n_long++;
    if (tc) n_cin++;
    if (full[W]) n_cout++;
  endtask

  task automatic report(input string name, input int n);
    $display("%-10s %0d", name, n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism %s never exercised", name);
    end
  endtask

  initial begin
    // Longest path: stage 1 generates, every later stage propagates.
    apply(32'hFFFF_FFFF, 32'h0000_0001, 1'b0);
    apply(32'hFFFF_FFF0, 32'h0000_000F, 1'b1);
    apply(32'h5555_555F, 32'hAAAA_AAA1, 1'b0);
    // Nucleus generates, upper stages propagate.
    apply(32'h0FFF_F800, 32'h0000_0800, 1'b0);
    apply(32'h0, 32'h0, 1'b0);
    // 8-bit worked example (1010_1010 + 0010_0100 = 1100_1110).
    apply(32'h0000_00AA, 32'h0000_0024, 1'b0);
    checks++;
    if (s !== 32'h0000_00CE || cout !== 1'b0) failures++;
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int i = 0; i < 300000; i++) begin
      logic [W-1:0] ra, rb;
      ra = $urandom; rb = $urandom;
      // Every fourth vector: make a random set of stages all-propagate so
      // that skips and long carry paths are frequent.
      if (i % 4 == 0) begin
        logic [Q-1:0] mask;
        mask = Q'($urandom);
        for (int k = 0; k < Q; k++) if (mask[k]) rb[k*M +: M] = ~ra[k*M +: M];
      end
      apply(ra, rb, 1'($urandom));
    end
    report("skip", n_skip);
    report("nuc_skip", n_nuc_skip);
    report("nuc_gen", n_nuc_gen);
    report("block_gen", n_block_gen);
    report("increment", n_increment);
    report("long_path", n_long);
    report("cin", n_cin);
    report("cout", n_cout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
