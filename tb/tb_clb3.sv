// tb_clb3: self-checking test of combinational block CLB3.
//
// Random and corner operands; the output is compared with a - b computed
// here in a different way than the block computes it.
module tb_clb3;
  localparam int unsigned W = 8;

  logic [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  clb3 #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    for (int i = 0; i < 1000; i++) begin
      case (i)
        0: begin a = '0; b = '0; end
        1: begin a = '1; b = '1; end
        2: begin a = '1; b = 8'h01; end
        3: begin a = 8'h00; b = 8'h80; end
        default: begin a = W'($urandom); b = W'($urandom); end
      endcase
      #1;
      exp = 8'((32'(a) + 256 - 32'(b)) % 256);
      checks++;
      if (y !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h y=%h expected %h", a, b, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
