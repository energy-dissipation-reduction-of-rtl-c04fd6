// tb_column_multiplier: checks the 18 constant products and the held y of
// the column multiplier against y_j * c_ji from the reference matrix, that
// the outputs appear one cycle after load, and that they hold while load
// is low.
module tb_column_multiplier;
  import detector_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned IN_W = 8;
  localparam int unsigned YW = y_width(IN_W);
  localparam int unsigned SW = s_width(IN_W);

  logic clk = 0, rst_n = 0, load = 0;
  logic signed [YW-1:0] y [N_Y];
  logic signed [SW-1:0] p [N_Y][N_TAPS];
  logic signed [YW-1:0] y_hold [N_Y];
  int checks = 0, failures = 0;
  longint yv [N_Y];

  column_multiplier #(.IN_W(IN_W)) dut (.clk, .rst_n, .load, .y, .p, .y_hold);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs();
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (longint'(y_hold[i]) != yv[i]) begin
        failures++; $display("y_hold[%0d] = %0d, want %0d", i, y_hold[i], yv[i]);
      end
      for (int t = 0; t < 3; t++) begin
        int j;
        j = (i / 3) * 3 + t;
        checks++;
        if (longint'(p[i][t]) != yv[j] * coef(j, i)) begin
          failures++;
          $display("p[%0d][%0d] = %0d, want %0d", i, t, p[i][t], yv[j] * coef(j, i));
        end
      end
    end
  endtask

  initial begin
    foreach (y[i]) y[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      for (int i = 0; i < 6; i++) begin
        case (n % 4)
          0: yv[i] = longint'($signed($urandom)) % (longint'(1) << (YW - 1));
          1: yv[i] = (longint'(1) << (YW - 1)) - 1;        // largest
          2: yv[i] = -(longint'(1) << (YW - 1));           // most negative
          default: yv[i] = longint'($signed($urandom_range(0, 40))) - 20;
        endcase
        y[i] = YW'(yv[i]);
      end
      load = 1;
      @(negedge clk);
      load = 0;
      check_outputs();
      // change y without load: outputs must hold
      foreach (y[i]) y[i] = YW'($urandom);
      @(negedge clk);
      @(negedge clk);
      check_outputs();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
