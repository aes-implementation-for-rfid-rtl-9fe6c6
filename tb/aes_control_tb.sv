// aes_control_tb: runs the controller alone through encryptions and
// decryptions and checks, clock by clock, the state sequence against the
// round schedule, the load and ShiftRow rotation controls, the sequence of
// round constants given to the key generator and its direction, the
// latencies (93 and 103 clocks), the done handshake and reset.
module aes_control_tb;
  import aes_pkg::ctrl_state_e;
  import aes_pkg::ST_IDLE;
  import aes_pkg::ST_LOAD;
  import aes_pkg::ST_ADD_RKEY;
  import aes_pkg::ST_SUBBYTE_SHFROW;
  import aes_pkg::ST_MIXCOL;
  import aes_pkg::ST_DONE;

  logic         clk = 0;
  logic         reset, start, dcryp_in;
  logic [127:0] din;
  logic         load_din, shf_h, shf_v, add_k, sub_k, dcryp;
  logic [1:0]   msel;
  logic [31:0]  state_word, rcon_word;
  logic         load_key, kg_en, kg_dcryp, done;
  ctrl_state_e  state_o;
  int checks = 0, failures = 0;

  aes_control dut (.*);

  always #5 clk = ~clk;

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Expected schedule, one entry per clock after the IDLE clock.
  function automatic void schedule(bit dec, ref ctrl_state_e q[$]);
    q.delete();
    repeat (dec ? 14 : 4) q.push_back(ST_LOAD);
    q.push_back(ST_ADD_RKEY);
    for (int r = 1; r <= 10; r++) begin
      if (dec && r > 1) repeat (4) q.push_back(ST_MIXCOL);
      repeat (4) q.push_back(ST_SUBBYTE_SHFROW);
      if (!dec && r < 10) repeat (4) q.push_back(ST_MIXCOL);
      q.push_back(ST_ADD_RKEY);
    end
    q.push_back(ST_DONE);
  endfunction

  task automatic run(bit dec);
    ctrl_state_e q[$];
    int rc_seen[$];
    int rc_exp[$];
    int lat, sub_cnt;
    logic [7:0] rc_tab [11] = '{8'h00, 8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};
    schedule(dec, q);
    din = {$urandom, $urandom, $urandom, $urandom};
    dcryp_in = dec;
    start = 1;
    #1;
    expect_true(state_o == ST_IDLE, "idle before start");
    lat = 1;
    sub_cnt = 0;
    @(posedge clk); #1;
    dcryp_in = !dec;  // must be latched, not followed
    for (int i = 0; i < q.size(); i++) begin
      expect_true(state_o == q[i], $sformatf("state %0d: got %s exp %s", i, state_o.name(), q[i].name()));
      expect_true(dcryp == dec, "latched direction");
      if (i < 4) begin
        expect_true(load_din && shf_h && state_word == din[127 - 32*i -: 32], "load column");
      end
      if (state_o == ST_SUBBYTE_SHFROW) begin
        int row;
        row = 3 - (sub_cnt % 4);
        expect_true(msel == (dec ? 2'((4 - row) % 4) : 2'(row)), "ShiftRow rotation");
        sub_cnt++;
      end
      if (kg_en) begin
        rc_seen.push_back(int'(rcon_word[31:24]));
        expect_true(sub_k && !shf_v, "key step uses free S-boxes");
        expect_true(kg_dcryp == (dec && state_o != ST_LOAD), "key direction");
      end
      expect_true(done == (state_o == ST_DONE), "done only in DONE");
      if (state_o == ST_DONE) break;
      lat++;
      @(posedge clk); #1;
    end
    lat++;  // the first DONE clock
    expect_true(lat == (dec ? 103 : 93), $sformatf("latency %0d", lat));
    // round constants: encrypt 1..10; decrypt 1..10 forward then 10..1 backward
    for (int r = 1; r <= 10; r++) rc_exp.push_back(int'(rc_tab[r]));
    if (dec) for (int r = 10; r >= 1; r--) rc_exp.push_back(int'(rc_tab[r]));
    expect_true(rc_seen == rc_exp, "round constant sequence");
    // done holds while start is held, and clears once it is released
    repeat (3) @(posedge clk);
    #1 expect_true(done, "done held");
    start = 0;
    @(posedge clk); #1;
    expect_true(!done && state_o == ST_IDLE, "back to idle");
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; start = 0; dcryp_in = 0; din = '0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    run(0);
    run(1);
    run(1);
    run(0);
    // reset in the middle of an operation
    start = 1;
    repeat (30) @(posedge clk);
    #1 reset = 1;
    @(posedge clk); #1;
    expect_true(state_o == ST_IDLE && !done, "reset to idle");
    reset = 0; start = 0;
    @(posedge clk); #1;
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
