// yacca_checker_tb: random and directed checks of the 8 x 25 scalable YACCA logic.
// The expected error is computed bit by bit over the bits that size_sel enables
// (8*size_sel bits, all 200 when size_sel is 0 or above 25). Directed cases put a
// single offending bit just inside and just outside the enabled range.
module yacca_checker_tb;
  localparam int W = 8, N = 25, VW = W * N;
  logic [VW-1:0] id, mask;
  logic [4:0]    size_sel;
  logic          err;
  int checks = 0, failures = 0;

  yacca_checker #(.SLICE_W(W), .N_SLICES(N), .SEL_W(5)) dut (.id, .mask, .size_sel, .err);

  function automatic logic ref_err(logic [VW-1:0] i, logic [VW-1:0] m, int sel);
    int nbits = (sel == 0 || sel > N) ? VW : sel * W;
    for (int k = 0; k < nbits; k++) if (i[k] && !m[k]) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check();
    logic exp;
    #1;
    exp = ref_err(id, mask, int'(size_sel));
    checks++;
    if (err !== exp) begin
      failures++;
      if (failures < 5) $display("FAIL sel=%0d err=%b exp=%b", size_sel, err, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // one offending bit at each position, every selection
    for (int sel = 0; sel < 32; sel++) begin
      for (int b = 0; b < VW; b += 7) begin
        id = '0; id[b] = 1'b1; mask = '1; mask[b] = 1'b0; size_sel = 5'(sel);
        check();
        mask[b] = 1'b1;  // now legal
        check();
      end
    end
    // random sparse vectors: mask covers most of id
    for (int t = 0; t < 4000; t++) begin
      for (int w = 0; w < VW; w += 32) begin
        id[w +: 8]   = 8'($urandom);
        id[w+8 +: 24] = '0;
      end
      mask = id;
      for (int w = 0; w < VW; w += 32) mask[w +: 32] = mask[w +: 32] | $urandom;
      if ($urandom_range(0, 1)) mask[$urandom_range(0, VW-1)] = 1'b0;
      size_sel = 5'($urandom_range(0, 31));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
