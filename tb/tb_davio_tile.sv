// tb_davio_tile: exhaustive check of the tile's edge placement:
// right_up = left_up, right_lo = top, bottom = left_lo ^ (left_up & top).
module tb_davio_tile;
  logic t, u, l, ru, rl, b;
  int checks = 0, failures = 0;

  davio_tile dut (.top_i(t), .left_up_i(u), .left_lo_i(l),
                  .right_up_o(ru), .right_lo_o(rl), .bottom_o(b));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {t, u, l} = 3'(i);
      #1;
      checks++;
      if (ru !== u || rl !== t || b !== (l != (u && t))) begin
        failures++;
        $display("FAIL t=%b u=%b l=%b -> ru=%b rl=%b b=%b", t, u, l, ru, rl, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
