// Feeds random layer pixels (often black, sometimes white or the Hit!
// backdrop colour) to the compositor in every state and compares the
// output, one clock late, with the layering rules written out in the
// testbench.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_display_compositor;
  import th_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  game_state_t state; logic a_down, b_down;
  rgb_t sight_px, background_px, title_px, beginner_px, intermediate_px, expert_px,
        target_a_px, target_b_px, hit_px, out_pixel;

  display_compositor dut (.*);

  function automatic rgb_t rnd_px();
    case ($urandom % 5)
      0, 1: return 24'h0;
      2:    return 24'hFFFFFF;
      3:    return 24'hFCFBFB;
      default: return 24'($urandom) | 24'h1;
    endcase
  endfunction

  function automatic rgb_t model();
    case (state)
      ST_TITLE: begin
        if (sight_px != 0) return sight_px;
        if (beginner_px != 0) return beginner_px;
        if (title_px == 24'hFFFFFF) return background_px;
        if (title_px != 0) return title_px;
        if (expert_px != 0) return expert_px;
        if (intermediate_px != 0) return intermediate_px;
        return background_px;
      end
      ST_BEGINNER: begin
        if (sight_px != 0) return sight_px;
        if (target_a_px == 24'hFFFFFF) return background_px;
        if (target_a_px != 0) return target_a_px;
        return background_px;
      end
      ST_INTERMEDIATE, ST_EXPERT: begin
        if (sight_px != 0) return sight_px;
        if (target_a_px == 24'hFFFFFF || target_b_px == 24'hFFFFFF) return background_px;
        if (target_a_px != 0 && !a_down) return target_a_px;
        if (target_b_px != 0 && !b_down) return target_b_px;
        return background_px;
      end
      default: begin
        if (hit_px == 24'hFCFBFB) return background_px;
        if (hit_px != 0) return hit_px;
        return background_px;
      end
    endcase
  endfunction

  initial begin
    rgb_t e;
    for (int i = 0; i < 5000; i++) begin
      state = game_state_t'($urandom % 5);
      a_down = 1'($urandom); b_down = 1'($urandom);
      sight_px = ($urandom % 4 == 0) ? 24'hFF8000 : 24'h0;
      background_px = 24'($urandom) | 24'h1;
      title_px = rnd_px(); beginner_px = rnd_px(); intermediate_px = rnd_px();
      expert_px = rnd_px(); target_a_px = rnd_px(); target_b_px = rnd_px(); hit_px = rnd_px();
      e = model();
      @(posedge clk); #1;
      `CHECK(out_pixel == e, $sformatf("state %0d: got %h expected %h", state, out_pixel, e))
    end
    `TB_DONE
  end
  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
