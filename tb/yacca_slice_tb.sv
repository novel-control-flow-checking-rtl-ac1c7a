// yacca_slice_tb: exhaustive check of the 8-bit YACCA replica.
// Every (id, mask) pair is applied; the expected error is worked out bit by bit:
// it is 1 when some bit is set in id and clear in mask.
module yacca_slice_tb;
  logic [7:0] id, mask;
  logic       err;
  int checks = 0, failures = 0;

  yacca_slice #(.SLICE_W(8)) dut (.id, .mask, .err);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        automatic logic exp;
        id = 8'(a); mask = 8'(b);
        #1;
        exp = 1'b0;
        for (int k = 0; k < 8; k++) if (id[k] == 1'b1 && mask[k] == 1'b0) exp = 1'b1;
        checks++;
        if (err !== exp) begin
          failures++;
          if (failures < 5) $display("FAIL id=%h mask=%h err=%b exp=%b", id, mask, err, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
