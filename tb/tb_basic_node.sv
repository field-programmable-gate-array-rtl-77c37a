// Testbench of basic_node: random and corner input pairs, checks that h is
// the larger and l the smaller input.
module tb_basic_node;
  logic [7:0] a, b, h, l;
  int checks = 0, failures = 0;

  basic_node #(.W(8)) dut (.a, .b, .h, .l);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      if (i < 4) begin a = (i[0]) ? 8'hff : 8'h00; b = (i[1]) ? 8'hff : 8'h00; end
      else begin a = 8'($urandom); b = 8'($urandom); end
      #1;
      checks++;
      if (h != ((a > b) ? a : b) || l != ((a > b) ? b : a)) begin
        failures++;
        $display("FAIL a=%0d b=%0d h=%0d l=%0d", a, b, h, l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
