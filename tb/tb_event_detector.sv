// tb_event_detector: self-checking test of the redundant-event detector.
//
// Events arrive with three 16-bit words drawn so that many repeat the last passed words
// exactly, or only in the bits the chosen resolution compares. A model keeps the last
// passed words. Checks: a redundant event is dropped (dropped pulses, no out_req), a new
// one is offered exactly tune ticks after it was taken, with its words on q1..q3; only
// passed events update the comparison words; all 8 resolutions (9..16 bits) are used;
// with en low nothing is dropped; a stalled receiver holds the event.
module tb_event_detector;
  import ctdsp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #0.5 clk = ~clk;

  logic [7:0] tune = 8'd25;
  logic       en = 1'b1;
  logic [2:0] res = 3'd7;
  logic       in_req = 1'b0, in_ack, out_req, out_ack = 1'b1, dropped;
  data_t      in1 = '0, in2 = '0, in3 = '0, q1, q2, q3;

  event_detector dut (.clk, .rst_n, .tune, .en, .res, .in_req, .in_ack, .in1, .in2, .in3,
                      .out_req, .out_ack, .q1, .q2, .q3, .dropped);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  data_t  last [3] = '{default: '0};
  data_t  cur [3];
  longint t_take;
  int     n_drop = 0, n_pass = 0;

  function automatic data_t msk(logic [2:0] r);
    return data_t'(16'hffff << (7 - r));
  endfunction

  task automatic one_event(bit stall);
    bit redundant;
    @(negedge clk);
    cur[0] = in1; cur[1] = in2; cur[2] = in3;
    redundant = en && ((in1 & msk(res)) == (last[0] & msk(res))) && ((in2 & msk(res)) == (last[1] & msk(res)))
                   && ((in3 & msk(res)) == (last[2] & msk(res)));
    in_req = 1'b1;
    while (!in_ack) @(negedge clk);
    t_take = cyc;
    @(negedge clk);
    in_req = 1'b0;
    in1 = data_t'($urandom); in2 = data_t'($urandom); in3 = data_t'($urandom);  // words change after the take
    out_ack = !stall;
    // wait for the end of the cell
    while (cyc < t_take + tune) @(negedge clk);
    if (redundant) begin
      check(dropped && !out_req, "redundant event dropped");
      n_drop++;
    end else begin
      check(out_req && !dropped, $sformatf("new event offered at tune (%0d)", cyc - t_take));
      check(q1 == cur[0] && q2 == cur[1] && q3 == cur[2], "words held on q");
      if (stall) begin
        repeat (7) @(negedge clk);
        check(out_req && !in_ack, "stalled event held");
        out_ack = 1'b1;
      end
      last = cur;
      n_pass++;
    end
    @(negedge clk);
    check(!out_req && !dropped, "one event per input");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 1600; k++) begin
      res  = 3'(k / 200);
      en   = (k % 200) >= 20;
      tune = 8'($urandom_range(1, 30));
      @(negedge clk);
      case ($urandom_range(0, 2))
        0: begin in1 = last[0]; in2 = last[1]; in3 = last[2]; end               // exact repeat
        1: begin                                                               // differs below the resolution
          in1 = last[0] ^ data_t'($urandom_range(0, 127) & ~msk(res));
          in2 = last[1];
          in3 = last[2] ^ data_t'($urandom_range(0, 127) & ~msk(res));
        end
        default: begin in1 = data_t'($urandom); in2 = last[1]; in3 = last[2]; end
      endcase
      one_event($urandom_range(0, 9) == 0);
    end
    check(n_drop > 300 && n_pass > 300, $sformatf("dropped %0d passed %0d", n_drop, n_pass));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
