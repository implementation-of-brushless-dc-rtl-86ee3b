// bldc_plant_model: behavioural model of the six-switch bridge, the BLDC motor
// and its three Hall sensors, for simulation only (not synthesizable intent).
//
// The rotor's electrical angle is kept as a sector number (0..5) plus a
// position inside the sector, 0 .. 2**SECTOR_SHIFT-1. Every clock:
//   - the gate pattern is turned into phase voltages (+, - or open per leg;
//     both switches of a leg on is counted as a shoot-through);
//   - if the energised pair is the one that produces forward torque in the
//     present sector the torque is +TORQUE, if it is the exactly reversed pair
//     it is -TORQUE, if nothing is on it is 0; the pattern of the previous
//     sector gives 0 and is accepted for up to STALE clocks after a sector
//     step (the controller's pipeline latency); any other pattern is counted
//     as a wrong commutation and gives 0;
//   - speed += torque - speed / 2**TAU_SHIFT, kept with 16 fraction bits
//     (first-order mechanics with a
//     time constant of 2**TAU_SHIFT clocks), position += speed, and the sector
//     steps forward or back when the position leaves its range.
// The steady-state speed at full drive is TORQUE * 2**TAU_SHIFT position units
// per clock. Hall outputs are updated with a non-blocking assignment, one
// clock after the sector changes, and follow the clockwise sector order
// 100, 101, 001, 011, 010, 110. `force_code` replaces the Hall outputs with
// `forced` (used to inject the invalid codes 000 and 111).
module bldc_plant_model #(
  parameter int SECTOR_SHIFT = 17,
  parameter int TAU_SHIFT    = 13,
  parameter int TORQUE       = 1,
  parameter int STALE        = 4
) (
  input  logic       clk,
  input  logic [5:0] gates,        // bit i-1 = Qi
  input  logic       force_code,
  input  logic [2:0] forced,
  output logic [2:0] hall,
  output int         sector,
  output longint     omega,
  output int         shoot_through,
  output int         wrong_pattern,
  output int         sector_steps
);

  localparam logic [2:0] CODES [6] = '{3'b100, 3'b101, 3'b001, 3'b011, 3'b010, 3'b110};
  // forward-torque phase voltages per sector, A B C: +1 / -1 / 0
  localparam int VA [6] = '{-1,  0, +1, +1,  0, -1};
  localparam int VB [6] = '{+1, +1,  0, -1, -1,  0};
  localparam int VC [6] = '{ 0, -1, -1,  0, +1, +1};

  longint pos;
  longint omega_fx;   // speed with 16 extra fraction bits
  int     prev_sector;
  int     since_step;

  initial begin
    sector = 0;
    omega = 0;
    omega_fx = 0;
    pos = 0;
    shoot_through = 0;
    wrong_pattern = 0;
    sector_steps = 0;
    prev_sector = 0;
    since_step = 1000;
  end

  logic [2:0] hall_q = 3'b100;
  assign hall = force_code ? forced : hall_q;

  function automatic int leg(logic hi, logic lo);
    return hi ? 1 : (lo ? -1 : 0);
  endfunction

  // forward or reversed pattern of sector s
  function automatic bit fits_sector(int s, int va, int vb, int vc);
    return (va == VA[s] && vb == VB[s] && vc == VC[s]) ||
           (va == -VA[s] && vb == -VB[s] && vc == -VC[s]);
  endfunction

  always @(posedge clk) begin
    int va, vb, vc, torque;
    va = leg(gates[0], gates[1]);
    vb = leg(gates[2], gates[3]);
    vc = leg(gates[4], gates[5]);
    if ((gates[0] && gates[1]) || (gates[2] && gates[3]) || (gates[4] && gates[5]))
      shoot_through++;
    torque = 0;
    if (gates != '0) begin
      if (va == VA[sector] && vb == VB[sector] && vc == VC[sector])
        torque = TORQUE;
      else if (va == -VA[sector] && vb == -VB[sector] && vc == -VC[sector])
        torque = -TORQUE;
      else if (!(since_step < STALE && fits_sector(prev_sector, va, vb, vc)))
        wrong_pattern++;
    end
    if (since_step < 1000) since_step++;
    omega_fx = omega_fx + (longint'(torque) <<< 16) - (omega_fx >>> TAU_SHIFT);
    omega    = omega_fx >>> 16;
    pos      = pos + omega;
    if (pos >= (longint'(1) << SECTOR_SHIFT)) begin
      pos    = pos - (longint'(1) << SECTOR_SHIFT);
      prev_sector = sector;
      since_step = 0;
      sector = (sector + 1) % 6;
      sector_steps++;
    end else if (pos < 0) begin
      pos    = pos + (longint'(1) << SECTOR_SHIFT);
      prev_sector = sector;
      since_step = 0;
      sector = (sector + 5) % 6;
      sector_steps++;
    end
    hall_q <= CODES[sector];   // sensors seen by the controller after this edge
  end

endmodule
