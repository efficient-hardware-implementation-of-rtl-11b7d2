// tb_const_mult - checks the seven shift-and-add products of const_mult
// against ordinary multiplication for corner and random signed inputs.
module tb_const_mult;
  localparam int IN_W = 16;
  localparam int MAG [7] = '{64, 89, 83, 75, 50, 36, 18};

  logic signed [IN_W-1:0] x;
  logic signed [IN_W+6:0] prod [7];
  int checks = 0, failures = 0;

  const_mult #(.IN_W(IN_W)) dut (.x, .prod);

  task automatic check_one(input int v);
    x = IN_W'(v);
    #1;
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (int'(prod[i]) != v * MAG[i]) begin
        failures++;
        $display("FAIL x=%0d const=%0d got=%0d", v, MAG[i], prod[i]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(0); check_one(1); check_one(-1);
    check_one(32767); check_one(-32768); check_one(255);
    for (int n = 0; n < 2000; n++) check_one(int'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
