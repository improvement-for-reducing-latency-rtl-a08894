// Testbench of the data cache address selection: for random addresses and
// all four combinations of FAC_Vali and FAC_enable2, the cache address must
// be the predicted fields exactly when both are high, and the normal
// effective address otherwise.
module tb_dcache_addr_sel;

  int checks = 0;
  int failures = 0;

  logic [31:0] eff, caddr, pred;
  logic        vali, en2, use_pred;

  dcache_addr_sel dut (
    .eff_addr(eff), .block_ofs(pred[4:0]), .pred_index(pred[13:5]), .pred_tag(pred[31:14]),
    .fac_vali(vali), .fac_enable2(en2), .cache_addr(caddr), .use_pred(use_pred)
  );

  initial begin
    for (int i = 0; i < 2000; i++) begin
      eff = $urandom;
      pred = $urandom;
      {vali, en2} = 2'(i);
      #1;
      checks++;
      if (use_pred != (vali && en2) || caddr != ((vali && en2) ? pred : eff)) begin
        failures++;
        $display("FAIL vali %b en2 %b: addr %h use %b (pred %h eff %h)",
                 vali, en2, caddr, use_pred, pred, eff);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
