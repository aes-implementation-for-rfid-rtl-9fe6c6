// key_gen_tb: runs the key generator ten rounds forward and then ten rounds
// backward, with a reference S-box closing the SubWord loop (key_sub_out ->
// SubWord -> key_sub_in in the same cycle, as the Data Unit does), and
// compares every round key with the reference key expansion. One clock per
// round key is checked by sampling after each single enabled clock.
module key_gen_tb;
  import aes_ref_pkg::*;

  logic         clk = 0;
  logic         load, en, dcryp;
  logic [127:0] key_in, key_out;
  logic [31:0]  rcon_in, key_sub_in, key_sub_out;
  logic [127:0] rk [11];
  int checks = 0, failures = 0;

  key_gen dut (.*);

  assign key_sub_in = {SB[key_sub_out[31:24]], SB[key_sub_out[23:16]],
                       SB[key_sub_out[15:8]], SB[key_sub_out[7:0]]};

  always #5 clk = ~clk;

  function automatic logic [31:0] rc_word(int i);
    logic [7:0] t [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};
    return {t[i-1], 24'h0};
  endfunction

  task automatic check(logic [127:0] exp, string what);
    checks++;
    if (key_out !== exp) begin
      failures++;
      $display("FAIL %s got=%032h exp=%032h", what, key_out, exp);
    end
  endtask

  task automatic run_key(logic [127:0] k);
    expand_key(k, rk);
    load = 1; en = 0; dcryp = 0; key_in = k; rcon_in = '0;
    @(posedge clk); #1;
    load = 0;
    check(rk[0], "load");
    for (int r = 1; r <= 10; r++) begin
      en = 1; rcon_in = rc_word(r);
      @(posedge clk); #1;
      check(rk[r], $sformatf("fwd%0d", r));
      en = 0;
      @(posedge clk); #1;
      check(rk[r], "hold");
    end
    dcryp = 1;
    for (int r = 10; r >= 1; r--) begin
      en = 1; rcon_in = rc_word(r);
      @(posedge clk); #1;
      check(rk[r-1], $sformatf("bwd%0d", r - 1));
    end
    en = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init_tables();
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    // last round key of this key, as printed in FIPS-197 Appendix A.1
    expand_key(128'h2b7e151628aed2a6abf7158809cf4f3c, rk);
    checks++;
    if (rk[10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++;
      $display("FAIL reference expansion");
    end
    for (int i = 0; i < 20; i++) run_key({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
