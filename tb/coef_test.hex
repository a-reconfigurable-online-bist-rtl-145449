// coef_test: four-word image for the coefficient ROM testbench
0a0b
1fff
1000
05a0
