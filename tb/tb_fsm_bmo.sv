// tb_fsm_bmo: self-checking test of the block of microoperations.
// Applies each of the six state codes and checks y1..y4 against the
// microoperation table written out here by state:
//   a1 000: -    a2 001: y1 y2   a3 011: y3
//   a4 101: y4   a5 010: y2 y4   a6 110: y3
// Each output must be a function of the state code only (Moore outputs).
module tb_fsm_bmo;
  logic [1:3] t;
  logic [1:4] y;
  int checks = 0, failures = 0;

  typedef struct { logic [1:3] code; logic y1, y2, y3, y4; } row_t;
  row_t tbl [6] = '{
    '{3'b000, 0, 0, 0, 0},
    '{3'b001, 1, 1, 0, 0},
    '{3'b011, 0, 0, 1, 0},
    '{3'b101, 0, 0, 0, 1},
    '{3'b010, 0, 1, 0, 1},
    '{3'b110, 0, 0, 1, 0}
  };

  fsm_bmo dut (.t(t), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++)
      foreach (tbl[k]) begin
        t = tbl[k].code;
        #1;
        checks++;
        if (y !== {tbl[k].y1, tbl[k].y2, tbl[k].y3, tbl[k].y4}) begin
          failures++;
          $display("t=%b: y=%b expected %b", t, y,
                   {tbl[k].y1, tbl[k].y2, tbl[k].y3, tbl[k].y4});
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
