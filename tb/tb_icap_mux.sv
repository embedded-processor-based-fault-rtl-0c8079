// tb_icap_mux: checks that the ICAP input takes the command word when
// sel = 0 and the frame word when sel = 1, over random data.
module tb_icap_mux;
  logic sel;
  logic [31:0] cmd_word, frame_word, icap_i;
  int checks = 0, failures = 0;

  icap_mux dut (.sel, .cmd_word, .frame_word, .icap_i);

  initial begin
    for (int k = 0; k < 200; k++) begin
      sel = 1'($urandom); cmd_word = $urandom; frame_word = $urandom;
      #1;
      checks++;
      if (icap_i != (sel ? frame_word : cmd_word)) begin
        failures++; $display("FAIL: sel=%0d", sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
