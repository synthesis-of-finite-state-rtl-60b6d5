// tb_fsm_bct: self-checking test of the code transformer.
// Three instances: all classes transformed (the code-transformation table:
// B1=00, B2=01, B3=10, so tau1 = states a5,a6 and tau2 = states a2,a3,a4),
// only B2 transformed (B2 -> 1, others 0, one bit), and B1 and B3
// transformed (B1 -> 01, B3 -> 10, B2 -> 00). Expected codes are written
// per state below.
module tb_fsm_bct;
  logic [1:3] t;
  logic [1:0] tau_all;
  logic [0:0] tau_b2;
  logic [1:0] tau_b13;
  int checks = 0, failures = 0;

  logic [1:3] code   [6] = '{3'b000, 3'b001, 3'b011, 3'b101, 3'b010, 3'b110};
  logic [1:0] e_all  [6] = '{2'b00, 2'b01, 2'b01, 2'b01, 2'b10, 2'b10};
  logic       e_b2   [6] = '{1'b0, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0};
  logic [1:0] e_b13  [6] = '{2'b01, 2'b00, 2'b00, 2'b00, 2'b10, 2'b10};

  fsm_bct                          u_all (.t(t), .tau(tau_all));
  fsm_bct #(.PI_C(3'b010))         u_b2  (.t(t), .tau(tau_b2));
  fsm_bct #(.PI_C(3'b101))         u_b13 (.t(t), .tau(tau_b13));

  task automatic chk(string what, logic [1:0] got, logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s t=%b: tau=%b expected %b", what, t, got, exp);
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
    for (int k = 0; k < 6; k++) begin
      t = code[k];
      #1;
      chk("all", tau_all, e_all[k]);
      chk("B2",  {1'b0, tau_b2}, {1'b0, e_b2[k]});
      chk("B13", tau_b13, e_b13[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
