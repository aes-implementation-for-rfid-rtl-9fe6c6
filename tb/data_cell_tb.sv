// data_cell_tb: random sequences of horizontal load, vertical load, key
// addition and hold, compared with a one-line model of the cell.
module data_cell_tb;
  logic       clk = 0;
  logic       shf_h, shf_v, add_k;
  logic [7:0] h_in, v_in, key, q, model;
  int checks = 0, failures = 0;

  data_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {shf_h, shf_v, add_k} = 3'b100;
    h_in = 8'h5a; v_in = 0; key = 0;
    @(posedge clk); #1;
    model = 8'h5a;
    for (int i = 0; i < 1000; i++) begin
      int op;
      op = $urandom_range(0, 3);
      {shf_h, shf_v, add_k} = (op == 0) ? 3'b100 : (op == 1) ? 3'b010 : (op == 2) ? 3'b001 : 3'b000;
      h_in = 8'($urandom); v_in = 8'($urandom); key = 8'($urandom);
      case (op)
        0: model = h_in;
        1: model = v_in;
        2: model = model ^ key;
        default: ;
      endcase
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL op=%0d got=%02h exp=%02h", op, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
