// tb_interrupt_gen: exhaustive check of the threshold comparator: every
// temperature, every threshold, with interrupts enabled and disabled. The
// expected flag is worked out with signed integer subtraction.
module tb_interrupt_gen;
  logic [7:0] temp, thresh;
  logic ie, flag, irq;
  int checks = 0, failures = 0;

  interrupt_gen #(.W(8)) dut (.temp, .thresh, .ie, .flag, .irq);

  initial begin
    for (int e = 0; e < 2; e++)
      for (int t = 0; t < 256; t++)
        for (int h = 0; h < 256; h++) begin
          bit exp_flag;
          temp = 8'(t); thresh = 8'(h); ie = 1'(e);
          #1;
          exp_flag = (t - h) > 0;
          checks++;
          if (flag !== exp_flag || irq !== (exp_flag && e == 1)) begin
            failures++;
            if (failures < 10)
              $display("FAIL: temp=%0d thresh=%0d ie=%0d flag=%b irq=%b", t, h, e, flag, irq);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
