// tb_symbol_node: the symbol node at each of the nine sizes of the symbol node synthesis
// study (degree 4, 8, 16 by 4, 8, 16 bits per message), with default LLR values. For random
// received bits and random incoming messages it checks the total LLR (channel LLR plus all
// inputs) and every outgoing message (total less the own input, saturated to W bits).
module tb_symbol_node;
  import ldpc_ref_pkg::*;
  int checks = 0, failures = 0;
  localparam int NV = 300;
  localparam int DEGS [3] = '{4, 8, 16};
  localparam int WS   [3] = '{4, 8, 16};
  int done_cnt = 0;

  for (genvar a = 0; a < 3; a++) begin : g_deg
    for (genvar b = 0; b < 3; b++) begin : g_w
      localparam int D  = DEGS[a];
      localparam int W  = WS[b];
      localparam int SW = W + $clog2(D + 1);
      logic                 rx;
      logic signed [W-1:0]  x [D];
      logic signed [W-1:0]  y [D];
      logic signed [SW-1:0] ybar;
      symbol_node #(.DEG(D), .W(W)) dut (.rx_bit(rx), .x, .y, .ybar);

      initial begin
        int mx, lv;
        mx = (1 << (W - 1)) - 1;
        lv = 1 << (W - 3);
        for (int t = 0; t < NV; t++) begin
          int xv [D];
          int tot;
          rx = 1'($urandom);
          tot = rx ? -lv : lv;
          for (int k = 0; k < D; k++) begin
            xv[k] = ($urandom_range(0, 3) == 0) ? (($urandom & 1) ? mx : -mx)
                                                : int'($urandom_range(0, 2 * mx)) - mx;
            x[k] = W'(xv[k]);
            tot += xv[k];
          end
          #1;
          checks++;
          if (int'(ybar) != tot) begin
            failures++;
            if (failures < 10) $display("FAIL deg=%0d w=%0d ybar got %0d exp %0d", D, W, ybar, tot);
          end
          for (int k = 0; k < D; k++) begin
            checks++;
            if (int'(y[k]) != satw(tot - xv[k], W)) begin
              failures++;
              if (failures < 10)
                $display("FAIL deg=%0d w=%0d out %0d got %0d exp %0d", D, W, k, y[k],
                         satw(tot - xv[k], W));
            end
          end
          #1;
        end
        done_cnt++;
      end
    end
  end

  initial begin
    wait (done_cnt == 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
