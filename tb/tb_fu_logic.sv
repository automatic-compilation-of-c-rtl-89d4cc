// tb_fu_logic: self-checking random test of fu_logic against a reference model written
// with plain SystemVerilog operators; includes corner operands.
// Prints TB_RESULT and finishes; a watchdog stops a hung run.
module tb_fu_logic;
  localparam int unsigned W = 32;
  int checks = 0, failures = 0;
  logic [W-1:0] a, b, c, y, exp_y;
  logic [2:0] op;
  fu_logic dut (.op(op[1:0]), .a, .b, .y);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [W-1:0] pick();
    case ($urandom_range(0, 5))
      0: return '0;
      1: return '1;
      2: return {1'b1, {(W-1){1'b0}}};
      3: return W'($urandom_range(0, 40));
      default: return $urandom;
    endcase
  endfunction
  initial begin
    for (int i = 0; i < 4000; i++) begin
      a = pick(); b = pick(); c = pick(); op = 3'($urandom);
      #1;
      for (int k = 0; k < W; k++)
        case (op[1:0])
          2'd0: exp_y[k] = (a[k] + b[k]) == 2;
          2'd1: exp_y[k] = (a[k] + b[k]) != 0;
          2'd2: exp_y[k] = (a[k] + b[k]) == 1;
          2'd3: exp_y[k] = (a[k] == 0);
        endcase
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("mismatch op=%0d a=%h b=%h c=%h y=%h exp=%h", op, a, b, c, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
