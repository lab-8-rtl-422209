0000
0000
4980
5040
c980
5040
4980
d040
c980
d040
