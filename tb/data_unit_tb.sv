// data_unit_tb: drives the Data Unit operation by operation with the control
// sequences of a full encryption and a full decryption round schedule and
// checks the whole State after each operation (load, SubByte/ShiftRow,
// MixColumn, AddRoundKey) against the reference model. Also checks the
// S-box path lent to the key generator (sub_k) and that each multi-clock
// operation takes exactly four clocks.
module data_unit_tb;
  import aes_ref_pkg::*;

  logic         clk = 0;
  logic         dcryp, load_din, shf_h, shf_v, add_k, sub_k;
  logic [1:0]   msel;
  logic [127:0] key, dout, model;
  logic [31:0]  state_in, key_sub_in, key_sub_out, sout;
  int checks = 0, failures = 0;

  data_unit dut (.*);

  always #5 clk = ~clk;

  task automatic idle();
    {load_din, shf_h, shf_v, add_k, sub_k} = '0;
    msel = 0;
  endtask

  task automatic check(logic [127:0] exp, string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s got=%032h exp=%032h", what, dout, exp);
    end
  endtask

  task automatic do_load(logic [127:0] blk);
    for (int c = 0; c < 4; c++) begin
      idle(); load_din = 1; shf_h = 1; state_in = blk[127 - 32*c -: 32];
      @(posedge clk); #1;
    end
    idle();
    model = blk;
    check(model, "load");
  endtask

  task automatic do_add(logic [127:0] k);
    idle(); add_k = 1; key = k;
    @(posedge clk); #1;
    idle();
    model ^= k;
    check(model, "add");
  endtask

  task automatic do_sub();
    for (int c = 0; c < 4; c++) begin
      idle(); shf_v = 1;
      msel = dcryp ? 2'(c + 1) : 2'(3 - c);
      @(posedge clk); #1;
      // the State must not be finished before the fourth clock
      if (c == 2) begin
        checks++;
        if (dout === sub_shift(model, dcryp)) begin
          failures++;
          $display("FAIL sub finished early");
        end
      end
    end
    idle();
    model = sub_shift(model, dcryp);
    check(model, "sub");
  endtask

  task automatic do_mix();
    for (int c = 0; c < 4; c++) begin
      idle(); shf_h = 1;
      checks++;
      if (sout !== ref_mix_col(model[127 - 32*c -: 32], dcryp)) begin
        failures++;
        $display("FAIL sout col %0d", c);
      end
      @(posedge clk); #1;
    end
    idle();
    model = mix(model, dcryp);
    check(model, "mix");
  endtask

  task automatic check_keysub();
    logic [31:0] w;
    w = $urandom;
    idle(); sub_k = 1; key_sub_in = w; #1;
    checks++;
    if (key_sub_out !== {SB[w[31:24]], SB[w[23:16]], SB[w[15:8]], SB[w[7:0]]}) begin
      failures++;
      $display("FAIL key subword dcryp=%0d", dcryp);
    end
    @(posedge clk); #1;
    idle();
    check(model, "hold during key sub");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] rk [11];
    logic [127:0] k, pt, ct;
    init_tables();
    key_sub_in = 0; state_in = 0; key = 0;
    for (int t = 0; t < 6; t++) begin
      k  = (t == 0) ? 128'h000102030405060708090a0b0c0d0e0f : {$urandom, $urandom, $urandom, $urandom};
      pt = (t == 0) ? 128'h00112233445566778899aabbccddeeff : {$urandom, $urandom, $urandom, $urandom};
      expand_key(k, rk);
      // encryption schedule
      dcryp = 0;
      do_load(pt);
      do_add(rk[0]);
      for (int r = 1; r <= 10; r++) begin
        do_sub();
        if (r != 10) begin
          check_keysub();
          do_mix();
        end
        do_add(rk[r]);
      end
      ct = dout;
      checks++;
      if (ct !== encrypt(pt, k)) begin
        failures++;
        $display("FAIL ciphertext");
      end
      if (t == 0) begin
        checks++;
        if (ct !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
          failures++;
          $display("FAIL FIPS-197 C.1 ciphertext %032h", ct);
        end
      end
      // decryption schedule
      dcryp = 1;
      do_load(ct);
      do_add(rk[10]);
      for (int r = 9; r >= 0; r--) begin
        do_sub();
        do_add(rk[r]);
        if (r != 0) begin
          check_keysub();
          do_mix();
        end
      end
      checks++;
      if (dout !== pt) begin
        failures++;
        $display("FAIL decrypted block");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
