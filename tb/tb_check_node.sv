// tb_check_node: the sign-min check node at each of the nine sizes of the check node
// synthesis study (degree 4, 8, 16 by 4, 8, 16 bits per message). Each size gets random
// input vectors, biased towards zero, small values and the extreme codes, and every output
// is compared with a reference that takes the product of the other inputs' signs and the
// minimum of their magnitudes.
module tb_check_node;
  int checks = 0, failures = 0;
  localparam int NV = 300;
  localparam int DEGS [3] = '{4, 8, 16};
  localparam int WS   [3] = '{4, 8, 16};
  int done_cnt = 0;

  for (genvar a = 0; a < 3; a++) begin : g_deg
    for (genvar b = 0; b < 3; b++) begin : g_w
      localparam int D = DEGS[a];
      localparam int W = WS[b];
      logic signed [W-1:0] x [D];
      logic signed [W-1:0] y [D];
      check_node #(.DEG(D), .W(W)) dut (.x, .y);

      function automatic int rnd_msg();
        int mx = (1 << (W - 1)) - 1;
        case ($urandom_range(0, 5))
          0: return 0;
          1: return -(mx + 1);            // most negative code
          2: return mx;
          3: return int'($urandom_range(0, 6)) - 3;
          default: return int'($urandom_range(0, 2 * mx + 1)) - (mx + 1);
        endcase
      endfunction

      initial begin
        int mx;
        mx = (1 << (W - 1)) - 1;
        for (int t = 0; t < NV; t++) begin
          int xv [D];
          for (int k = 0; k < D; k++) begin
            xv[k] = rnd_msg();
            x[k] = W'(xv[k]);
          end
          #1;
          for (int k = 0; k < D; k++) begin
            int mn, mg, exp;
            bit s;
            mn = mx;
            s  = 0;
            for (int j = 0; j < D; j++) if (j != k) begin
              mg = (xv[j] < 0) ? -xv[j] : xv[j];
              if (mg > mx) mg = mx;
              if (mg < mn) mn = mg;
              s ^= (xv[j] < 0);
            end
            exp = s ? -mn : mn;
            checks++;
            if (int'(y[k]) != exp) begin
              failures++;
              if (failures < 10)
                $display("FAIL deg=%0d w=%0d out %0d got %0d exp %0d", D, W, k, y[k], exp);
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
