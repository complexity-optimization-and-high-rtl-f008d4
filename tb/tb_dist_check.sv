// tb_dist_check: compares the close/distant decision with
// (|xa-xb| < r) && (|ya-yb| < r) evaluated on integers, for random points,
// points straddling the radius on either axis, and identical points.
module tb_dist_check;
  import botm_pkg::*;
  int checks = 0, failures = 0;
  logic [XY_W-1:0] xa, ya, xb, yb, r;
  logic close;
  dist_check dut (.*);

  task automatic t(int ax, int ay, int bx, int by, int rr);
    bit e;
    xa = XY_W'(ax); ya = XY_W'(ay); xb = XY_W'(bx); yb = XY_W'(by); r = XY_W'(rr);
    #1;
    e = ((ax > bx ? ax - bx : bx - ax) < rr) && ((ay > by ? ay - by : by - ay) < rr);
    checks++;
    if (close != e) failures++;
  endtask

  initial begin
    t(100, 100, 100, 100, 70);
    t(100, 100, 169, 100, 70);
    t(100, 100, 170, 100, 70);
    t(170, 100, 100, 100, 70);
    t(100, 100, 100, 31, 70);
    t(100, 100, 100, 30, 70);
    t(100, 100, 150, 150, 70);
    for (int i = 0; i < 2000; i++)
      t($urandom % 4000, $urandom % 4000, $urandom % 4000, $urandom % 4000, 1 + $urandom % 3000);
    for (int i = 0; i < 2000; i++) begin
      automatic int x = 200 + $urandom % 1000, y = 200 + $urandom % 1000;
      t(x, y, x + ($urandom % 141) - 70, y + ($urandom % 141) - 70, 50 + $urandom % 30);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
