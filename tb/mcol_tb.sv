// mcol_tb: MixColumn and InvMixColumn of random and known columns against
// the reference model; also checks that InvMixColumn undoes MixColumn.
module mcol_tb;
  import aes_ref_pkg::*;

  logic [31:0] col_in, col_out, fwd;
  logic        dcryp;
  int checks = 0, failures = 0;

  mcol dut (.col_in(col_in), .dcryp(dcryp), .col_out(col_out));

  task automatic check(logic [31:0] exp, string what);
    checks++;
    if (col_out !== exp) begin
      failures++;
      $display("FAIL %s in=%08h dcryp=%0d got=%08h exp=%08h", what, col_in, dcryp, col_out, exp);
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
    // known column from the AES literature
    col_in = 32'hdb135345; dcryp = 0; #1; check(32'h8e4da1bc, "known");
    col_in = 32'h8e4da1bc; dcryp = 1; #1; check(32'hdb135345, "known_inv");
    col_in = 32'hf20a225c; dcryp = 0; #1; check(32'h9fdc589d, "known2");
    for (int i = 0; i < 500; i++) begin
      col_in = $urandom;
      dcryp = 0; #1; check(ref_mix_col(col_in, 1'b0), "fwd");
      fwd = col_out;
      dcryp = 1; #1; check(ref_mix_col(col_in, 1'b1), "inv");
      col_in = fwd; #1; check(ref_mix_col(fwd, 1'b1), "roundtrip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
