// sbox_tb: exhaustive check of the combinational S-box in both directions
// against the reference model (exhaustive-search field inverse), plus a few
// FIPS-197 table entries written out literally.
module sbox_tb;
  import aes_ref_pkg::*;

  logic [7:0] in, out;
  logic       inv;
  int checks = 0, failures = 0;

  sbox dut (.in(in), .inv(inv), .out(out));

  task automatic check(logic [7:0] exp, string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s in=%02h inv=%0d got=%02h exp=%02h", what, in, inv, out, exp);
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
    init_tables();
    for (int i = 0; i < 256; i++) begin
      in = 8'(i); inv = 0; #1; check(SB[i], "fwd");
      inv = 1; #1; check(ISB[i], "inv");
    end
    // literal FIPS-197 entries
    in = 8'h00; inv = 0; #1; check(8'h63, "lit");
    in = 8'h53; inv = 0; #1; check(8'hed, "lit");
    in = 8'hff; inv = 0; #1; check(8'h16, "lit");
    in = 8'h63; inv = 1; #1; check(8'h00, "lit");
    in = 8'hed; inv = 1; #1; check(8'h53, "lit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
