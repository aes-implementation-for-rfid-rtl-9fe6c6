// aes_top_tb: end-to-end test of the AES-128 co-processor at its only
// configuration. Encrypts and decrypts the FIPS-197 example blocks and
// random blocks under random keys, compares with the reference model,
// checks the 93/103-clock latencies and the done handshake, resets the core
// in mid-operation, and counts how often each mechanism of the design ran:
// column load, decryption key pre-run in LOAD, AddRoundKey, SubByte/ShiftRow
// shift, MixColumn shift, forward and backward key steps (and the key steps
// taken in an AddRoundKey clock). A mechanism that never ran is a failure.
module aes_top_tb;
  import aes_ref_pkg::*;
  import aes_pkg::ST_LOAD;

  logic         clk = 0;
  logic         reset, dcryp, start, done;
  logic [127:0] din, key, dout;
  int checks = 0, failures = 0;
  int n_load = 0, n_load_dec_keyrun = 0, n_add = 0, n_sub = 0, n_mix = 0;
  int n_key_fwd = 0, n_key_bwd = 0, n_key_in_add = 0, n_enc = 0, n_dec = 0, n_reset = 0;

  aes_top dut (.*);

  always #5 clk = ~clk;

  // Mechanism counters, observed on the controller's outputs.
  always @(posedge clk) if (!reset) begin
    if (dut.load_din) n_load++;
    if (dut.u_control.state_o == ST_LOAD && dut.kg_en) n_load_dec_keyrun++;
    if (dut.add_k) n_add++;
    if (dut.shf_v) n_sub++;
    if (dut.shf_h && !dut.load_din) n_mix++;
    if (dut.kg_en && !dut.kg_dcryp) n_key_fwd++;
    if (dut.kg_en && dut.kg_dcryp) n_key_bwd++;
    if (dut.kg_en && dut.add_k) n_key_in_add++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(bit dec, logic [127:0] blk, logic [127:0] k, output logic [127:0] res);
    int lat;
    dcryp = dec; din = blk; key = k; start = 1;
    lat = 1;
    @(posedge clk);
    while (!done) begin
      lat++;
      @(posedge clk);
      if (lat > 200) break;
    end
    res = dout;
    check(lat == (dec ? 103 : 93), $sformatf("%s latency %0d", dec ? "decrypt" : "encrypt", lat));
    // inputs may change once the operation is over; dout must hold
    din = ~din; key = ~key;
    repeat (2) @(posedge clk);
    check(done && dout == res, "result held while start high");
    #1 start = 0;
    @(posedge clk);
    #1 check(!done, "done cleared");
    if (dec) n_dec++; else n_enc++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] r, k, pt;
    init_tables();
    reset = 1; start = 0; dcryp = 0; din = 0; key = 0;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    @(posedge clk); #1;

    // FIPS-197 Appendix C.1 and Appendix B
    run(0, 128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, r);
    check(r == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1 encrypt");
    run(1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h000102030405060708090a0b0c0d0e0f, r);
    check(r == 128'h00112233445566778899aabbccddeeff, "FIPS-197 C.1 decrypt");
    run(0, 128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, r);
    check(r == 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 B encrypt");

    // reset during a decryption, then carry on
    dcryp = 1; din = {4{$urandom}}; key = {4{$urandom}}; start = 1;
    repeat (40) @(posedge clk);
    #1 reset = 1; start = 0;
    @(posedge clk);
    #1 reset = 0;
    check(!done, "no done after reset");
    n_reset++;

    for (int i = 0; i < 40; i++) begin
      k  = {$urandom, $urandom, $urandom, $urandom};
      pt = {$urandom, $urandom, $urandom, $urandom};
      run(0, pt, k, r);
      check(r == encrypt(pt, k), "random encrypt");
      run(1, r, k, r);
      check(r == pt, "random decrypt round trip");
      run(1, pt, k, r);
      check(r == decrypt(pt, k), "random decrypt");
    end

    check(n_enc > 0 && n_dec > 0 && n_reset > 0, "encrypt, decrypt and reset exercised");
    check(n_load > 0 && n_load_dec_keyrun > 0, "load and decryption key pre-run exercised");
    check(n_add > 0 && n_sub > 0 && n_mix > 0, "round operations exercised");
    check(n_key_fwd > 0 && n_key_bwd > 0 && n_key_in_add > 0, "key steps exercised");
    $display("mechanisms: enc=%0d dec=%0d reset=%0d load=%0d keyprerun=%0d add=%0d sub=%0d mix=%0d keyfwd=%0d keybwd=%0d key_in_add=%0d",
             n_enc, n_dec, n_reset, n_load, n_load_dec_keyrun, n_add, n_sub, n_mix, n_key_fwd, n_key_bwd, n_key_in_add);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
