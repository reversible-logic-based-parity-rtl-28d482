// tb_comm_channel: random words and error masks through a 4-line and a
// 7-line channel; every masked line must arrive inverted, every other line
// unchanged.
module tb_comm_channel;
  logic [3:0] tx4, m4, rx4;
  logic [6:0] tx7, m7, rx7;
  int checks = 0, failures = 0;

  comm_channel                dut4 (.tx(tx4), .err_mask(m4), .rx(rx4));
  comm_channel #(.WIDTH(7))   dut7 (.tx(tx7), .err_mask(m7), .rx(rx7));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      tx4 = 4'($urandom); m4 = (n < 20) ? 4'd0 : 4'($urandom);
      tx7 = 7'($urandom); m7 = (n < 20) ? 7'd0 : 7'($urandom);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (rx4[i] !== (m4[i] ? ~tx4[i] : tx4[i])) begin
          failures++;
          $display("FAIL w4 line %0d tx=%b m=%b rx=%b", i, tx4, m4, rx4);
        end
      end
      for (int i = 0; i < 7; i++) begin
        checks++;
        if (rx7[i] !== (m7[i] ? ~tx7[i] : tx7[i])) begin
          failures++;
          $display("FAIL w7 line %0d tx=%b m=%b rx=%b", i, tx7, m7, rx7);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
